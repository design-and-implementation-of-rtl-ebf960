// data_decryption: iterative AES-128 decryption (the inverse cipher) of one block.
//
// The block contains its own key schedule (key_gen) and one instance of each inverse
// step: inv_shift_rows, inv_sub_bytes, inv_mix_columns and add_round_key, each a
// registered stage. The controller routes the state through them and reads the round
// keys in reverse order:
//   AddRoundKey(rk10)                                                  1 cycle
//   InvShiftRows, InvSubBytes, AddRoundKey(rk9)                        3 cycles
//   8 x (InvMixColumns, InvShiftRows, InvSubBytes, AddRoundKey(rk8..rk1)) 4 cycles each
//   InvMixColumns, InvShiftRows, InvSubBytes, AddRoundKey(rk0)         4 cycles
// plus the output register: outvalid pulses 41 cycles after datainvalid was accepted.
// Handshake, key loading and reset are as in data_encryption. The step order is the
// AES inverse cipher; the schedule is this design's own.
module data_decryption
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   keyinvalid,
  input  block_t key,
  output logic   keysvalid,
  input  logic   datainvalid,
  input  block_t datain,
  output logic   ready,
  output logic   outvalid,
  output block_t dataout
);
  block_t [NB_ROUNDS:0] rk;
  logic       busy;
  logic [3:0] kidx;    // round key used by the last AddRoundKey load
  logic       start;

  logic   isr_iv, isr_ov, isb_ov, imc_iv, imc_ov, ark_iv, ark_ov;
  block_t isr_in, isr_out, isb_out, imc_out, ark_in, ark_key, ark_out;

  key_gen u_key_gen (
    .clk(clk), .rst(rst), .invalid(keyinvalid), .key_in(key), .keysvalid(keysvalid), .rk(rk)
  );

  assign ready = keysvalid && !busy;
  assign start = datainvalid && ready;

  wire ark_first = busy && ark_ov && (kidx == 4'(NB_ROUNDS));
  wire ark_mid   = busy && ark_ov && (kidx != 4'(NB_ROUNDS)) && (kidx != 4'd0);
  assign imc_iv  = ark_mid;
  assign isr_iv  = ark_first || imc_ov;
  assign isr_in  = imc_ov ? imc_out : ark_out;
  assign ark_iv  = start || isb_ov;
  assign ark_in  = start ? datain : isb_out;
  assign ark_key = start ? rk[NB_ROUNDS] : rk[kidx - 4'd1];

  inv_shift_rows u_inv_shift_rows (
    .clk(clk), .rst(rst), .in_valid(isr_iv), .data_in(isr_in), .out_valid(isr_ov), .data_out(isr_out)
  );
  inv_sub_bytes u_inv_sub_bytes (
    .clk(clk), .rst(rst), .in_valid(isr_ov), .data_in(isr_out), .out_valid(isb_ov), .data_out(isb_out)
  );
  inv_mix_columns u_inv_mix_columns (
    .clk(clk), .rst(rst), .in_valid(imc_iv), .data_in(ark_out), .out_valid(imc_ov), .data_out(imc_out)
  );
  add_round_key u_add_round_key (
    .clk(clk), .rst(rst), .in_valid(ark_iv), .key_in(ark_key), .data_in(ark_in),
    .out_valid(ark_ov), .data_out(ark_out)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= 1'b0;
      kidx     <= '0;
      outvalid <= 1'b0;
      dataout  <= '0;
    end else begin
      outvalid <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        kidx <= 4'(NB_ROUNDS);
      end else if (isb_ov) begin
        kidx <= kidx - 4'd1;
      end
      if (busy && ark_ov && kidx == 4'd0) begin
        busy     <= 1'b0;
        outvalid <= 1'b1;
        dataout  <= ark_out;
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst) start |-> !busy);
endmodule
