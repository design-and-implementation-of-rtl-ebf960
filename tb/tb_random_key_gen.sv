// tb_random_key_gen: self-checking testbench for random_key_gen. Drives random TID and
// key1 values and checks key2 = TID ^ key1 one cycle after in_valid, the key_valid
// pulse, that key2 holds while in_valid is low, and reset. One vector is chosen so that
// key2 is the FIPS-197 example key 2b7e1516...4f3c.
module tb_random_key_gen;
  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic         in_valid = 1'b0;
  logic [127:0] tid = '0, key1 = '0;
  logic         key_valid;
  logic [127:0] key2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  random_key_gen dut (.clk(clk), .rst(rst), .in_valid(in_valid), .tid(tid), .key1(key1),
                      .key_valid(key_valid), .key2(key2));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic apply(logic [127:0] t, logic [127:0] k, logic [127:0] expected);
    logic [127:0] prev = key2;
    @(negedge clk);
    tid = t;
    key1 = k;
    @(negedge clk);
    check(key2 == prev && !key_valid, "key2 holds without in_valid");
    in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    check(key_valid, "key_valid one cycle after in_valid");
    check(key2 == expected, $sformatf("key2 %h expected %h", key2, expected));
    @(negedge clk);
    check(!key_valid, "key_valid is a pulse");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    check(key2 == '0 && !key_valid, "reset");
    rst = 1'b0;
    apply(128'he2000017221100861230abcd00000000, 128'he2000017221100861230abcd00000000 ^ 128'h2b7e151628aed2a6abf7158809cf4f3c,
          128'h2b7e151628aed2a6abf7158809cf4f3c);
    for (int n = 0; n < 100; n++) begin
      automatic logic [127:0] t = {$urandom, $urandom, $urandom, $urandom};
      automatic logic [127:0] k = {$urandom, $urandom, $urandom, $urandom};
      automatic logic [127:0] e;
      for (int b = 0; b < 128; b++) e[b] = (t[b] != k[b]);
      apply(t, k, e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
