// key_gen: AES-128 key expansion. On a rising edge of invalid the cipher key is taken
// as round key 0; then one round key is derived per clock cycle,
//   w0' = w0 ^ SubWord(RotWord(w3)) ^ Rcon,  w1' = w1 ^ w0',  w2' = w2 ^ w1',
//   w3' = w3 ^ w2',
// with Rcon starting at {01} and multiplied by {02} every round. All eleven round keys
// are kept in registers (rk[0] .. rk[10]) so both the cipher and the inverse cipher can
// read any of them. keysvalid is low while keys are being generated and rises ten
// cycles after the load, staying high until the next load. The round-key function is
// AES; one key per cycle and holding all keys in registers are this design's choices.
// rst is synchronous, active high, and clears keysvalid.
module key_gen
  import aes_pkg::*;
#(
  parameter int unsigned ROUNDS = NB_ROUNDS
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  invalid,
  input  block_t                key_in,
  output logic                  keysvalid,
  output block_t [ROUNDS:0]     rk
);
  logic       invalid_q;
  logic       running;
  logic [3:0] idx;      // index of the round key written next
  byte_t      rcon;
  block_t     prev, next_key;

  assign prev = rk[idx - 4'd1];

  always_comb begin
    logic [31:0] w0, w1, w2, w3, t;
    w0 = prev[127:96];
    w1 = prev[95:64];
    w2 = prev[63:32];
    w3 = prev[31:0];
    // RotWord then SubWord, then Rcon on the first byte
    t = {SBOX[w3[23:16]] ^ rcon, SBOX[w3[15:8]], SBOX[w3[7:0]], SBOX[w3[31:24]]};
    w0 = w0 ^ t;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    next_key = {w0, w1, w2, w3};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      invalid_q <= 1'b0;
      running   <= 1'b0;
      keysvalid <= 1'b0;
      idx       <= 4'd1;
      rcon      <= 8'h01;
      rk        <= '0;
    end else begin
      invalid_q <= invalid;
      if (invalid && !invalid_q) begin
        rk[0]     <= key_in;
        idx       <= 4'd1;
        rcon      <= 8'h01;
        running   <= 1'b1;
        keysvalid <= 1'b0;
      end else if (running) begin
        rk[idx] <= next_key;
        rcon    <= xtime(rcon);
        idx     <= idx + 4'd1;
        if (idx == 4'(ROUNDS)) begin
          running   <= 1'b0;
          keysvalid <= 1'b1;
        end
      end
    end
  end
endmodule
