// tb_uart_rx: self-checking testbench for uart_rx at 16 clocks per bit. A serial
// driver in the testbench sends random bytes as 8N1 frames with random idle gaps and
// checks each received byte, one data_valid pulse per frame, and that the byte arrives
// within 10 bit times of the frame start. A frame with a low stop bit must be dropped,
// and a short low glitch must not start a frame.
module tb_uart_rx;
  localparam int CPB = 16;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       rxd = 1'b1;
  logic       data_valid;
  logic [7:0] data;
  int checks = 0, failures = 0;
  int pulses = 0;
  logic [7:0] last;

  always #5 clk = ~clk;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.clk(clk), .rst(rst), .rxd(rxd), .data_valid(data_valid), .data(data));

  always @(posedge clk) if (data_valid) begin
    pulses++;
    last = data;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic send(logic [7:0] b, bit stop);
    logic [9:0] f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rxd = f[i];
      repeat (CPB) @(negedge clk);
    end
    rxd = 1'b1;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (CPB) @(negedge clk);
    for (int n = 0; n < 60; n++) begin
      automatic logic [7:0] b = 8'($urandom);
      automatic int p0 = pulses;
      send(b, 1'b1);
      repeat (2 + CPB / 2) @(negedge clk);
      check(pulses == p0 + 1, "one data_valid per frame");
      check(last == b, $sformatf("received %h expected %h", last, b));
      repeat ($urandom_range(0, 3 * CPB)) @(negedge clk);
    end
    begin
      automatic int p0 = pulses;
      send(8'h5a, 1'b0);           // framing error
      repeat (3 * CPB) @(negedge clk);
      check(pulses == p0, "frame with low stop bit dropped");
      rxd = 1'b0;                  // glitch shorter than half a bit
      repeat (CPB / 4) @(negedge clk);
      rxd = 1'b1;
      repeat (12 * CPB) @(negedge clk);
      check(pulses == p0, "glitch ignored");
      send(8'hc3, 1'b1);
      repeat (CPB) @(negedge clk);
      check(pulses == p0 + 1 && last == 8'hc3, "receives again after errors");
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
