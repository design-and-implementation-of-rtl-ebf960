// buffer128_8: splits a 128-bit result into bytes for the serial transmitter. A block
// is loaded when in_valid is high and busy is low; the bytes are then offered to the
// transmitter most significant first: tx_start is high with tx_data while a byte is
// pending, and a byte counts as taken in a cycle where tx_start and tx_ready are both
// high. busy falls in the cycle after the last byte is taken. Blocks offered while busy
// are ignored. This output register is this design's way of returning the 128-bit
// result over an 8-bit link. rst is synchronous, active high.
module buffer128_8
  import aes_pkg::*;
#(
  parameter int unsigned BYTES = NB_BYTES
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               in_valid,
  input  logic [8*BYTES-1:0] data_in,
  output logic               busy,
  output logic               tx_start,
  output logic [7:0]         tx_data,
  input  logic               tx_ready
);
  logic [8*BYTES-1:0]          shreg;
  logic [$clog2(BYTES+1)-1:0]  left;

  assign busy     = (left != '0);
  assign tx_start = busy;
  assign tx_data  = shreg[8*BYTES-1 -: 8];

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg <= '0;
      left  <= '0;
    end else if (!busy) begin
      if (in_valid) begin
        shreg <= data_in;
        left  <= ($bits(left))'(BYTES);
      end
    end else if (tx_ready) begin
      shreg <= {shreg[8*BYTES-9:0], 8'h00};
      left  <= left - 1'b1;
    end
  end
endmodule
