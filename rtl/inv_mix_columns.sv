// inv_mix_columns: AES InvMixColumns step, the inverse of MixColumns. Each 32-bit
// column is multiplied by d(x) = {0b}x^3 + {0d}x^2 + {09}x + {0e} modulo x^4 + 1, i.e.
// by the matrix [e b d 9; 9 e b d; d 9 e b; b d 9 e]. Four column units work in
// parallel using constant GF(2^8) multipliers, so the step takes one cycle. One cycle
// after in_valid, data_out holds the result and out_valid pulses; rst (synchronous,
// active high) clears the register.
module inv_mix_columns
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   in_valid,
  input  block_t data_in,
  output logic   out_valid,
  output block_t data_out
);
  block_t mixed;

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      byte_t a0, a1, a2, a3;
      a0 = data_in[127 - 32*c -: 8];
      a1 = data_in[119 - 32*c -: 8];
      a2 = data_in[111 - 32*c -: 8];
      a3 = data_in[103 - 32*c -: 8];
      mixed[127 - 32*c -: 8] = gf_mul(a0, 8'h0e) ^ gf_mul(a1, 8'h0b) ^ gf_mul(a2, 8'h0d) ^ gf_mul(a3, 8'h09);
      mixed[119 - 32*c -: 8] = gf_mul(a0, 8'h09) ^ gf_mul(a1, 8'h0e) ^ gf_mul(a2, 8'h0b) ^ gf_mul(a3, 8'h0d);
      mixed[111 - 32*c -: 8] = gf_mul(a0, 8'h0d) ^ gf_mul(a1, 8'h09) ^ gf_mul(a2, 8'h0e) ^ gf_mul(a3, 8'h0b);
      mixed[103 - 32*c -: 8] = gf_mul(a0, 8'h0b) ^ gf_mul(a1, 8'h0d) ^ gf_mul(a2, 8'h09) ^ gf_mul(a3, 8'h0e);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      data_out  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) data_out <= mixed;
    end
  end
endmodule
