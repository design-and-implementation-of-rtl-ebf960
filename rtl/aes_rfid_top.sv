// aes_rfid_top: the complete encryption/decryption circuit between a PC's serial port
// and a tag's secret keys.
//
// Data path:
//   rxd -> uart_rx -> buffer8_128 --(mode_decrypt = 0)--> data_encryption
//            -> data_randomizer (randomize) ---------------------------+
//                               --(mode_decrypt = 1)--> data_randomizer |
//            (de-randomize) -> data_decryption ------------------------+-> buffer128_8
//   buffer128_8 -> uart_tx -> txd
// Keys: a pulse on key_load makes random_key_gen form key2 = tid ^ key1, which is then
// loaded into the key schedules of both data_encryption and data_decryption;
// keys_ready rises when both schedules are done. key3 seeds both randomizers.
//
// Each complete 16-byte block received is processed in the mode selected by
// mode_decrypt at the moment it completes, and the 16 result bytes are sent back. A
// block that completes while keys are not ready or while the previous block is still
// being processed or sent is dropped (the dropped output pulses for one cycle).
// Processing takes 41 cycles for AES plus 17 for the randomizer; the serial link is
// far slower. rst is synchronous, active high.
module aes_rfid_top
  import aes_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         mode_decrypt,
  input  logic         key_load,
  input  logic [127:0] tid,
  input  logic [127:0] key1,
  input  logic [95:0]  key3,
  input  logic         rxd,
  output logic         txd,
  output logic         keys_ready,
  output logic         busy,
  output logic         dropped
);
  logic       rx_valid;
  logic [7:0] rx_byte;
  logic       blk_valid;
  block_t     blk;
  logic       key2_valid;
  block_t     key2;
  logic       enc_keysvalid, dec_keysvalid, enc_ready, dec_ready;
  logic       enc_start, enc_ov, rnd_ov, derand_start, derand_ov, dec_ov;
  logic       rnd_busy, derand_busy;
  block_t     enc_out, rnd_out, derand_out, dec_out;
  logic       ob_load, ob_busy, ob_busy_q, tx_start, tx_ready;
  block_t     ob_data;
  logic [7:0] tx_byte;
  logic       in_flight, accept;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart_rx (
    .clk(clk), .rst(rst), .rxd(rxd), .data_valid(rx_valid), .data(rx_byte)
  );

  buffer8_128 u_buffer8_128 (
    .clk(clk), .rst(rst), .in_valid(rx_valid), .data_in(rx_byte), .out_valid(blk_valid), .data_out(blk)
  );

  random_key_gen u_random_key_gen (
    .clk(clk), .rst(rst), .in_valid(key_load), .tid(tid), .key1(key1), .key_valid(key2_valid), .key2(key2)
  );

  assign keys_ready = enc_keysvalid && dec_keysvalid;
  assign accept     = blk_valid && keys_ready && !in_flight;
  assign enc_start  = accept && !mode_decrypt;
  assign derand_start = accept && mode_decrypt;

  // encryption: AES, then randomization
  data_encryption u_data_encryption (
    .clk(clk), .rst(rst), .keyinvalid(key2_valid), .key(key2), .keysvalid(enc_keysvalid),
    .datainvalid(enc_start), .datain(blk), .ready(enc_ready), .outvalid(enc_ov), .dataout(enc_out)
  );
  data_randomizer u_randomizer (
    .clk(clk), .rst(rst), .in_valid(enc_ov), .data_in(enc_out), .key3(key3),
    .busy(rnd_busy), .out_valid(rnd_ov), .data_out(rnd_out)
  );

  // decryption: de-randomization, then AES inverse cipher
  data_randomizer u_derandomizer (
    .clk(clk), .rst(rst), .in_valid(derand_start), .data_in(blk), .key3(key3),
    .busy(derand_busy), .out_valid(derand_ov), .data_out(derand_out)
  );
  data_decryption u_data_decryption (
    .clk(clk), .rst(rst), .keyinvalid(key2_valid), .key(key2), .keysvalid(dec_keysvalid),
    .datainvalid(derand_ov), .datain(derand_out), .ready(dec_ready), .outvalid(dec_ov), .dataout(dec_out)
  );

  assign ob_load = rnd_ov || dec_ov;
  assign ob_data = rnd_ov ? rnd_out : dec_out;

  buffer128_8 u_buffer128_8 (
    .clk(clk), .rst(rst), .in_valid(ob_load), .data_in(ob_data), .busy(ob_busy),
    .tx_start(tx_start), .tx_data(tx_byte), .tx_ready(tx_ready)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart_tx (
    .clk(clk), .rst(rst), .start(tx_start), .data(tx_byte), .ready(tx_ready), .txd(txd)
  );

  // one block in flight from acceptance until its last byte has gone to the transmitter
  always_ff @(posedge clk) begin
    if (rst) begin
      in_flight <= 1'b0;
      ob_busy_q <= 1'b0;
      dropped   <= 1'b0;
    end else begin
      ob_busy_q <= ob_busy;
      dropped   <= blk_valid && !accept;
      if (accept) in_flight <= 1'b1;
      else if (ob_busy_q && !ob_busy) in_flight <= 1'b0;
    end
  end

  assign busy = in_flight;

  // the engines are idle whenever a block is accepted
  assert property (@(posedge clk) disable iff (rst) enc_start |-> enc_ready);
  assert property (@(posedge clk) disable iff (rst) derand_ov |-> dec_ready);
  assert property (@(posedge clk) disable iff (rst) ob_load |-> !ob_busy);
  assert property (@(posedge clk) disable iff (rst) derand_start |-> !derand_busy && !rnd_busy);
endmodule
