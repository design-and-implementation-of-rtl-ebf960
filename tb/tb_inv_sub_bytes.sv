// tb_inv_sub_bytes: self-checking testbench for inv_sub_bytes (InvSubBytes).
// Applies the known-answer vector (FIPS-197 Appendix B, round 1 read backwards), then 200 random states compared with the
// independent reference model in aes_ref_pkg. Checks that out_valid pulses exactly one
// cycle after in_valid, that data_out holds while in_valid is low, and that reset
// clears the output register.
module tb_inv_sub_bytes;
  import aes_ref_pkg::*;

  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic         in_valid = 1'b0;
  logic [127:0] din = '0, key = '0;
  logic         out_valid;
  logic [127:0] dout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  inv_sub_bytes dut (
    .clk(clk), .rst(rst), .in_valid(in_valid),
    .data_in(din), .out_valid(out_valid), .data_out(dout)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // one operation: present din for one cycle, expect the result one cycle later
  task automatic apply(logic [127:0] expected);
    @(negedge clk);
    in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    check(out_valid == 1'b1, "out_valid one cycle after in_valid");
    check(dout == expected, $sformatf("data_out %h, expected %h", dout, expected));
    @(negedge clk);
    check(out_valid == 1'b0, "out_valid is a single-cycle pulse");
    check(dout == expected, "data_out holds while idle");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    check(out_valid == 1'b0 && dout == '0, "reset clears the output");
    rst = 1'b0;
    din = 128'hd42711aee0bf98f1b8b45de51e415230;
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    apply(128'h193de3bea0f4e22b9ac68d2ae9f84808);
    for (int n = 0; n < 200; n++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      key = {$urandom, $urandom, $urandom, $urandom};
      apply(ref_sub(din, 1));
    end
    @(negedge clk);
    rst = 1'b1;
    @(negedge clk);
    check(dout == '0 && out_valid == 1'b0, "synchronous reset clears the output");
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
