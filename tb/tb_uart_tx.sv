// tb_uart_tx: self-checking testbench for uart_tx at 16 clocks per bit. Sends random
// bytes and decodes txd in the testbench by sampling the middle of each bit: start bit
// low, 8 data bits LSB first, stop bit high. Checks that ready is low for exactly 10
// bit times per frame and that txd idles high.
module tb_uart_tx;
  localparam int CPB = 16;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       start = 1'b0;
  logic [7:0] data = '0;
  logic       ready, txd;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk(clk), .rst(rst), .start(start), .data(data), .ready(ready), .txd(txd));

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
    @(negedge clk);
    check(txd && ready, "idle high and ready");
    for (int n = 0; n < 40; n++) begin
      automatic logic [7:0] b = 8'($urandom);
      logic [9:0] f;
      automatic int busy_cycles = 0;
      @(negedge clk);
      data = b;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      data = ~b;
      // now half a clock after the frame began; sample each bit in its middle
      fork
        begin
          repeat (CPB / 2 - 1) @(negedge clk);
          for (int i = 0; i < 10; i++) begin
            f[i] = txd;
            repeat (CPB) @(negedge clk);
          end
        end
        begin
          while (!ready) begin
            @(negedge clk);
            busy_cycles++;
          end
        end
      join
      check(f[0] == 1'b0, "start bit");
      check(f[8:1] == b, $sformatf("sent %h expected %h", f[8:1], b));
      check(f[9] == 1'b1, "stop bit");
      check(busy_cycles == 10 * CPB, $sformatf("ready low for %0d cycles", busy_cycles));
      check(txd == 1'b1, "idle after frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
