// tb_key_gen: self-checking testbench for key_gen. Loads the FIPS-197 key
// 2b7e1516...4f3c and checks all eleven round keys (round 10 must be
// d014f9a8c9ee2589e13f0cc8b6630ca6) and that keysvalid rises exactly ten cycles after
// the rising edge of invalid and is low meanwhile. Then loads random keys, holding
// invalid high as a level, and compares against the reference key expansion.
module tb_key_gen;
  import aes_ref_pkg::*;

  logic               clk = 1'b0;
  logic               rst = 1'b1;
  logic               invalid = 1'b0;
  logic [127:0]       key = '0;
  logic               keysvalid;
  logic [10:0][127:0] rk;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  key_gen dut (.clk(clk), .rst(rst), .invalid(invalid), .key_in(key), .keysvalid(keysvalid), .rk(rk));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic load_and_check(logic [127:0] k, bit pulse);
    rk_t exp_rk = ref_expand(k);
    int cycles = 0;
    @(negedge clk);
    key = k;
    invalid = 1'b1;
    @(negedge clk);
    if (pulse) invalid = 1'b0;
    cycles = 1;
    while (!keysvalid && cycles < 40) begin
      @(negedge clk);
      cycles++;
    end
    check(cycles == 11, $sformatf("keysvalid after %0d cycles, expected 11 (load + 10 rounds)", cycles));
    for (int r = 0; r <= 10; r++)
      check(rk[r] == exp_rk[r], $sformatf("round key %0d = %h, expected %h", r, rk[r], exp_rk[r]));
    invalid = 1'b0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    check(keysvalid == 1'b0, "keysvalid low in reset");
    rst = 1'b0;
    load_and_check(128'h2b7e151628aed2a6abf7158809cf4f3c, 1'b1);
    check(rk[10] == 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "FIPS-197 round-10 key");
    check(rk[1] == 128'ha0fafe1788542cb123a339392a6c7605, "FIPS-197 round-1 key");
    for (int n = 0; n < 30; n++)
      load_and_check({$urandom, $urandom, $urandom, $urandom}, n[0]);
    // keysvalid stays high while nothing is loaded
    repeat (5) @(negedge clk);
    check(keysvalid == 1'b1, "keysvalid holds");
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
