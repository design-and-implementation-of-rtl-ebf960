// tb_buffer128_8: self-checking testbench for buffer128_8. Loads random blocks and
// takes the bytes with a transmitter model whose tx_ready is random, checking that the
// 16 bytes come out most significant first, each exactly once, that busy covers the
// transfer and that a block offered while busy is ignored.
module tb_buffer128_8;
  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic         in_valid = 1'b0;
  logic [127:0] din = '0;
  logic         busy, tx_start, tx_ready = 1'b0;
  logic [7:0]   tx_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  buffer128_8 dut (.clk(clk), .rst(rst), .in_valid(in_valid), .data_in(din), .busy(busy),
                   .tx_start(tx_start), .tx_data(tx_data), .tx_ready(tx_ready));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    check(!busy && !tx_start, "reset state");
    rst = 1'b0;
    for (int blk = 0; blk < 40; blk++) begin
      automatic logic [127:0] b = {$urandom, $urandom, $urandom, $urandom};
      automatic logic [127:0] got = '0;
      automatic int n = 0;
      @(negedge clk);
      din = b;
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      check(busy && tx_start, "busy after load");
      din = ~b;
      in_valid = 1'b1;        // ignored while busy
      while (busy && n < 16) begin
        tx_ready = ($urandom_range(0, 2) == 0);
        if (tx_ready && tx_start) begin
          got[127 - 8*n -: 8] = tx_data;
          n++;
        end
        @(negedge clk);
        in_valid = 1'b0;
      end
      tx_ready = 1'b0;
      check(n == 16, $sformatf("%0d bytes taken", n));
      check(got == b, $sformatf("bytes %h expected %h", got, b));
      check(!busy && !tx_start, "idle after 16 bytes");
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
