// mix_columns: AES MixColumns step. Each 32-bit column is treated as a polynomial over
// GF(2^8) and multiplied by c(x) = {03}x^3 + {01}x^2 + {01}x + {02} modulo x^4 + 1,
// i.e. by the circulant matrix [2 3 1 1; 1 2 3 1; 1 1 2 3; 3 1 1 2]. Four column
// units work in parallel, each built from xtime (multiply by {02}) and XORs, so the
// step takes one cycle. One cycle after in_valid, data_out holds the result and
// out_valid pulses; rst (synchronous, active high) clears the register.
module mix_columns
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
      mixed[127 - 32*c -: 8] = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
      mixed[119 - 32*c -: 8] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
      mixed[111 - 32*c -: 8] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
      mixed[103 - 32*c -: 8] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
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
