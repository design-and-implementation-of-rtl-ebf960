// inv_shift_rows: AES InvShiftRows step, the inverse of ShiftRows. Row r of the 4x4
// state is rotated right by r bytes, so output byte (r, c) takes input byte
// (r, (c - r) mod 4). Pure wiring followed by the output register: one cycle after
// in_valid, data_out holds the result and out_valid pulses; rst (synchronous, active
// high) clears the register.
module inv_shift_rows
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   in_valid,
  input  block_t data_in,
  output logic   out_valid,
  output block_t data_out
);
  block_t shifted;

  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        shifted[127 - 8*(4*c + r) -: 8] = data_in[127 - 8*(4*((c + 4 - r) % 4) + r) -: 8];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      data_out  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) data_out <= shifted;
    end
  end
endmodule
