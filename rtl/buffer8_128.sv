// buffer8_128: collects received 8-bit frames into a 128-bit block. Each byte with
// in_valid is shifted in at the bottom of a 128-bit shift register, so the first byte
// of a block ends up as its most significant byte (AES byte 0). When the BYTES-th byte
// has arrived, out_valid pulses for one cycle and data_out holds the block; counting
// then restarts for the next block. The 128-bit register filled from 8-bit frames is
// the scheme's; the byte order is this design's choice. rst (synchronous, active high)
// empties the register.
module buffer8_128
  import aes_pkg::*;
#(
  parameter int unsigned BYTES = NB_BYTES
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  logic [7:0]       data_in,
  output logic             out_valid,
  output logic [8*BYTES-1:0] data_out
);
  logic [$clog2(BYTES+1)-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) begin
      count     <= '0;
      data_out  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        data_out <= {data_out[8*BYTES-9:0], data_in};
        if (count == ($bits(count))'(BYTES - 1)) begin
          count     <= '0;
          out_valid <= 1'b1;
        end else begin
          count <= count + 1'b1;
        end
      end
    end
  end
endmodule
