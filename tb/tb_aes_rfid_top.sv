// tb_aes_rfid_top: end-to-end testbench of aes_rfid_top at its default parameters
// (434 clocks per bit). The testbench plays the PC: it sends 16-byte blocks as 8N1
// serial frames on rxd and decodes the 16 bytes returned on txd.
//   - a block sent before any key is loaded must be dropped (no reply);
//   - key2 = tid ^ key1 is built to be the FIPS-197 key 2b7e1516...4f3c; encrypting
//     3243f6a8...0734 must return 3925841d...0b32 XOR the PRBS keystream of key3,
//     and sending that back in decrypt mode must return the plaintext;
//   - new tid/key1/key3 (FIPS-197 C.1 key 000102..0f and random ones) are loaded and the
//     round trip repeated, switching mode every block;
//   - the processing time from a complete block to the result being handed to the
//     output buffer must be 58 cycles (41 AES + 17 randomizer) in both modes.
// Counts encrypt blocks, decrypt blocks, mode switches, key reloads and dropped blocks;
// each must happen at least once.
module tb_aes_rfid_top;
  import aes_ref_pkg::*;

  localparam int CPB = 434;

  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic         mode_decrypt = 1'b0, key_load = 1'b0;
  logic [127:0] tid = '0, key1 = '0;
  logic [95:0]  key3 = '0;
  logic         rxd = 1'b1;
  logic         txd, keys_ready, busy, dropped;
  int checks = 0, failures = 0;
  int n_enc = 0, n_dec = 0, n_switch = 0, n_keyload = 0, n_drop = 0;
  logic         last_mode = 1'b0;
  logic [7:0]   rx_q [$];

  always #5 clk = ~clk;

  aes_rfid_top dut (
    .clk(clk), .rst(rst), .mode_decrypt(mode_decrypt), .key_load(key_load), .tid(tid), .key1(key1),
    .key3(key3), .rxd(rxd), .txd(txd), .keys_ready(keys_ready), .busy(busy), .dropped(dropped)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (!rst && dropped) n_drop++;

  // processing time from a complete block to the result entering the output buffer
  int t_blk = -1, last_latency = -1, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (dut.blk_valid && dut.accept) t_blk = cyc;
    if (dut.ob_load && t_blk >= 0) last_latency = cyc - t_blk;
  end

  // PC receiver: decode frames on txd, sampling mid-bit
  initial begin
    forever begin
      automatic logic [7:0] b;
      @(negedge txd);
      repeat (CPB / 2) @(posedge clk);
      if (txd == 1'b0) begin
        for (int i = 0; i < 8; i++) begin
          repeat (CPB) @(posedge clk);
          b[i] = txd;
        end
        repeat (CPB) @(posedge clk);
        if (txd != 1'b1) begin
          failures++;
          $display("FAIL: stop bit on txd");
        end
        rx_q.push_back(b);
      end
    end
  end

  task automatic send_byte(logic [7:0] b);
    logic [9:0] f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rxd = f[i];
      repeat (CPB) @(negedge clk);
    end
  endtask

  task automatic send_block(logic [127:0] blk);
    for (int i = 0; i < 16; i++) send_byte(blk[127 - 8*i -: 8]);
  endtask

  task automatic set_mode(logic m);
    mode_decrypt = m;
    if (m != last_mode) n_switch++;
    last_mode = m;
  endtask

  // send a block and wait for the 16-byte reply
  task automatic transact(logic m, logic [127:0] blk, logic [127:0] expected);
    logic [127:0] got;
    int waited = 0;
    set_mode(m);
    rx_q.delete();
    send_block(blk);
    while (rx_q.size() < 16 && waited < 20 * 10 * CPB) begin
      @(negedge clk);
      waited++;
    end
    check(rx_q.size() == 16, $sformatf("%0d reply bytes", rx_q.size()));
    for (int i = 0; i < 16; i++) got[127 - 8*i -: 8] = (i < rx_q.size()) ? rx_q[i] : 8'h00;
    check(got == expected, $sformatf("%s reply %h expected %h", m ? "decrypt" : "encrypt", got, expected));
    check(last_latency == 58, $sformatf("processing time %0d cycles, expected 58", last_latency));
    if (m) n_dec++; else n_enc++;
    repeat (3 * CPB) @(negedge clk);
    check(!busy, "idle after the reply");
  endtask

  task automatic load_keys(logic [127:0] t, logic [127:0] k1, logic [95:0] k3);
    @(negedge clk);
    tid = t;
    key1 = k1;
    key3 = k3;
    key_load = 1'b1;
    @(negedge clk);
    key_load = 1'b0;
    @(negedge clk);
    check(!keys_ready, "keys not ready during key expansion");
    repeat (15) @(negedge clk);
    check(keys_ready, "keys ready after key expansion");
    n_keyload++;
  endtask

  initial begin
    logic [127:0] ks, ct;
    repeat (5) @(negedge clk);
    rst = 1'b0;
    repeat (CPB) @(negedge clk);

    // no keys yet: the block is dropped and nothing comes back
    send_block(128'h3243f6a8885a308d313198a2e0370734);
    repeat (30 * CPB) @(negedge clk);
    check(rx_q.size() == 0 && n_drop == 1, "block without keys dropped");

    // FIPS-197 Appendix B key through the TID xor key1 step
    load_keys(128'he28011700000020d1234567800000000,
              128'he28011700000020d1234567800000000 ^ 128'h2b7e151628aed2a6abf7158809cf4f3c,
              96'h3a94d63f1c27b5e8096ad4c1);
    ks = ref_keystream(key3);
    transact(1'b0, 128'h3243f6a8885a308d313198a2e0370734, 128'h3925841d02dc09fbdc118597196a0b32 ^ ks);
    transact(1'b1, 128'h3925841d02dc09fbdc118597196a0b32 ^ ks, 128'h3243f6a8885a308d313198a2e0370734);

    // FIPS-197 Appendix C.1 key
    load_keys(128'h0, 128'h000102030405060708090a0b0c0d0e0f, 96'h0123456789abcdeffedcba98);
    ks = ref_keystream(key3);
    transact(1'b0, 128'h00112233445566778899aabbccddeeff, 128'h69c4e0d86a7b0430d8cdb78070b4c55a ^ ks);
    transact(1'b1, 128'h69c4e0d86a7b0430d8cdb78070b4c55a ^ ks, 128'h00112233445566778899aabbccddeeff);

    // random tag
    load_keys({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom},
              {$urandom, $urandom, $urandom});
    ks = ref_keystream(key3);
    begin
      automatic logic [127:0] pt = {$urandom, $urandom, $urandom, $urandom};
      ct = ref_encrypt(pt, tid ^ key1) ^ ks;
      transact(1'b0, pt, ct);
      transact(1'b1, ct, pt);
    end

    check(n_enc > 0, "encrypt mode exercised");
    check(n_dec > 0, "decrypt mode exercised");
    check(n_switch > 0, "mode switch exercised");
    check(n_keyload > 1, "key reload exercised");
    check(n_drop > 0, "block drop exercised");
    $display("encrypt=%0d decrypt=%0d mode_switches=%0d key_loads=%0d dropped=%0d",
             n_enc, n_dec, n_switch, n_keyload, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
