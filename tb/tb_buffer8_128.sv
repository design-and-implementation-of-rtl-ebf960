// tb_buffer8_128: self-checking testbench for buffer8_128. Feeds random bytes with
// random gaps and checks that out_valid pulses once per 16 bytes, in the cycle after
// the 16th, with the first byte of the block in bits 127:120.
module tb_buffer8_128;
  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic         in_valid = 1'b0;
  logic [7:0]   din = '0;
  logic         out_valid;
  logic [127:0] dout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  buffer8_128 dut (.clk(clk), .rst(rst), .in_valid(in_valid), .data_in(din), .out_valid(out_valid), .data_out(dout));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int blk = 0; blk < 30; blk++) begin
      logic [127:0] exp_blk;
      for (int i = 0; i < 16; i++) begin
        repeat ($urandom_range(0, 3)) begin
          @(negedge clk);
          check(!out_valid, "no out_valid while filling");
        end
        din = 8'($urandom);
        exp_blk[127 - 8*i -: 8] = din;
        in_valid = 1'b1;
        @(negedge clk);
        in_valid = 1'b0;
        if (i < 15) check(!out_valid, "no out_valid before 16 bytes");
      end
      check(out_valid, "out_valid after the 16th byte");
      check(dout == exp_blk, $sformatf("block %h expected %h", dout, exp_blk));
      @(negedge clk);
      check(!out_valid, "out_valid is a pulse");
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
