// add_round_key: AES AddRoundKey step, the XOR of the 128-bit state with a 128-bit
// round key. The result is registered: one cycle after in_valid, data_out holds
// data_in ^ key_in and out_valid pulses for one cycle. A synchronous active-high rst
// clears the output register. The XOR is the AES definition; registering every
// step on the clock and the in_valid/out_valid pulse protocol are this design's way of
// sequencing the steps.
module add_round_key
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   in_valid,
  input  block_t key_in,
  input  block_t data_in,
  output logic   out_valid,
  output block_t data_out
);
  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      data_out  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) data_out <= data_in ^ key_in;
    end
  end
endmodule
