// sub_bytes: AES SubBytes step. Each of the 16 state bytes is replaced through the
// AES S-box look-up table. The logic is organised as four 32-bit S-box units, one per
// state column, each made of four byte look-ups, so the whole state is substituted in
// one cycle. The table comes from aes_pkg, where it is computed from the S-box
// definition at elaboration. One cycle after in_valid, data_out holds the result and
// out_valid pulses; rst (synchronous, active high) clears the output register.
module sub_bytes
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   in_valid,
  input  block_t data_in,
  output logic   out_valid,
  output block_t data_out
);
  block_t sub;

  // four 32-bit S-box units (columns), four bytes each
  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        sub[127 - 8*(4*c + r) -: 8] = SBOX[data_in[127 - 8*(4*c + r) -: 8]];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      data_out  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) data_out <= sub;
    end
  end
endmodule
