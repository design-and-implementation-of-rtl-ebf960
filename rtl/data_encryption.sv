// data_encryption: iterative AES-128 encryption of one 128-bit block.
//
// The block contains its own key schedule (key_gen) and one instance of each round
// step: sub_bytes, shift_rows, mix_columns and add_round_key. Every step is a
// registered stage, and a small controller routes the state from one stage to the
// next, so one stage works at a time:
//   initial AddRoundKey(rk0)                                   1 cycle
//   rounds 1..9: SubBytes, ShiftRows, MixColumns, AddRoundKey  4 cycles each
//   round 10:    SubBytes, ShiftRows, AddRoundKey (MixColumns bypassed)  3 cycles
// plus one cycle for the output register: outvalid pulses 41 cycles after the cycle in
// which datainvalid was accepted, and dataout then holds the ciphertext until the next
// block finishes. A block is accepted when datainvalid is high and ready is high
// (keys valid, no block in progress). Load the key with a rising edge of keyinvalid;
// keysvalid follows ten cycles later. The round structure and the reuse of one unit
// per step follow the AES algorithm and the step-by-step module split; the cycle
// schedule and handshake are this design's own. rst is synchronous, active high.
module data_encryption
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

  logic   sb_iv, sb_ov, sr_ov, mc_iv, mc_ov, ark_iv, ark_ov;
  block_t sb_in, sb_out, sr_out, mc_out, ark_in, ark_key, ark_out;

  key_gen u_key_gen (
    .clk(clk), .rst(rst), .invalid(keyinvalid), .key_in(key), .keysvalid(keysvalid), .rk(rk)
  );

  assign ready = keysvalid && !busy;
  assign start = datainvalid && ready;

  // routing between the stages
  wire final_round_sr = sr_ov && (kidx == 4'(NB_ROUNDS - 1));
  assign sb_iv   = busy && ark_ov && (kidx != 4'(NB_ROUNDS));
  assign sb_in   = ark_out;
  assign mc_iv   = sr_ov && !final_round_sr;
  assign ark_iv  = start || mc_ov || final_round_sr;
  assign ark_in  = start ? datain : (mc_ov ? mc_out : sr_out);
  assign ark_key = start ? rk[0] : rk[kidx + 4'd1];

  sub_bytes u_sub_bytes (
    .clk(clk), .rst(rst), .in_valid(sb_iv), .data_in(sb_in), .out_valid(sb_ov), .data_out(sb_out)
  );
  shift_rows u_shift_rows (
    .clk(clk), .rst(rst), .in_valid(sb_ov), .data_in(sb_out), .out_valid(sr_ov), .data_out(sr_out)
  );
  mix_columns u_mix_columns (
    .clk(clk), .rst(rst), .in_valid(mc_iv), .data_in(sr_out), .out_valid(mc_ov), .data_out(mc_out)
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
        kidx <= '0;
      end else if (mc_ov || final_round_sr) begin
        kidx <= kidx + 4'd1;
      end
      if (busy && ark_ov && kidx == 4'(NB_ROUNDS)) begin
        busy     <= 1'b0;
        outvalid <= 1'b1;
        dataout  <= ark_out;
      end
    end
  end

  // a new block can only be accepted while idle
  assert property (@(posedge clk) disable iff (rst) start |-> !busy);
endmodule
