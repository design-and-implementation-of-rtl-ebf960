// tb_data_randomizer: self-checking testbench for data_randomizer. Randomizes the
// AES example ciphertext 3925841d...0b32 and random blocks with random key3 values and
// compares with the block XOR the reference keystream (an independent recurrence model
// of the 12-stage PRBS). Also checks that running the result through the unit again
// restores the input (de-randomization), the 17-cycle latency, busy, and that a
// request while busy is ignored. The first keystream is also checked against the
// recurrence worked by hand for key3 = 0x0102...0c.
module tb_data_randomizer;
  import aes_ref_pkg::*;

  localparam int LATENCY = 17;

  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic         in_valid = 1'b0;
  logic [127:0] din = '0;
  logic [95:0]  key3 = '0;
  logic         busy, out_valid;
  logic [127:0] dout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  data_randomizer dut (.clk(clk), .rst(rst), .in_valid(in_valid), .data_in(din), .key3(key3),
                       .busy(busy), .out_valid(out_valid), .data_out(dout));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run(logic [127:0] d, logic [127:0] expected);
    int cycles;
    @(negedge clk);
    din = d;
    in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    cycles = 1;
    check(busy, "busy after start");
    din = ~d;
    in_valid = 1'b1;          // ignored while busy
    @(negedge clk);
    in_valid = 1'b0;
    cycles++;
    while (!out_valid && cycles < 100) begin
      @(negedge clk);
      cycles++;
    end
    check(cycles == LATENCY, $sformatf("latency %0d, expected %0d", cycles, LATENCY));
    check(dout == expected, $sformatf("data_out %h expected %h", dout, expected));
    check(!busy, "idle when done");
  endtask

  initial begin
    logic [127:0] r;
    repeat (3) @(negedge clk);
    check(!busy && !out_valid && dout == '0, "reset state");
    rst = 1'b0;
    // hand-worked: key3 bytes 01..0c leave last-first: 0c 0b ... 01, then
    // a12 = a0^a1^a4^a6 = 0c^0b^08^06 = 09, a13 = 0b^0a^07^05 = 03,
    // a14 = 0a^09^06^04 = 01, a15 = 09^08^05^03 = 07
    key3 = 96'h0102030405060708090a0b0c;
    run('0, 128'h0c0b0a09080706050403020109030107);
    key3 = {$urandom, $urandom, $urandom};
    r = 128'h3925841d02dc09fbdc118597196a0b32 ^ ref_keystream(key3);
    run(128'h3925841d02dc09fbdc118597196a0b32, r);
    run(r, 128'h3925841d02dc09fbdc118597196a0b32);
    for (int n = 0; n < 100; n++) begin
      automatic logic [127:0] d = {$urandom, $urandom, $urandom, $urandom};
      key3 = {$urandom, $urandom, $urandom};
      r = d ^ ref_keystream(key3);
      run(d, r);
      run(r, d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
