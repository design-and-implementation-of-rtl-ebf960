// tb_data_encryption: self-checking testbench for data_encryption. Loads a key, waits for
// keysvalid, and runs the FIPS-197 known-answer vectors (key 2b7e1516...4f3c and key
// 000102...0f), then random keys and blocks against the independent reference model.
// Checks that outvalid pulses exactly 41 cycles after datainvalid is accepted, that
// ready is low while a block is in progress and that a start request during that time
// is ignored, and that dataout holds until the next block. Finally holds datainvalid
// high for eight blocks and checks that results come every 41 cycles (128 bits per
// 41 clocks, the sustained rate).
module tb_data_encryption;
  import aes_ref_pkg::*;

  localparam int LATENCY = 41;

  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic         keyinvalid = 1'b0, datainvalid = 1'b0;
  logic [127:0] key = '0, datain = '0;
  logic         keysvalid, ready, outvalid;
  logic [127:0] dataout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  data_encryption dut (
    .clk(clk), .rst(rst), .keyinvalid(keyinvalid), .key(key), .keysvalid(keysvalid),
    .datainvalid(datainvalid), .datain(datain), .ready(ready), .outvalid(outvalid), .dataout(dataout)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic load_key(logic [127:0] k);
    @(negedge clk);
    key = k;
    keyinvalid = 1'b1;
    @(negedge clk);
    keyinvalid = 1'b0;
    check(!ready, "not ready while the key schedule runs");
    repeat (12) @(negedge clk);
    check(keysvalid && ready, "keysvalid and ready after key expansion");
  endtask

  task automatic run(logic [127:0] d, logic [127:0] expected);
    int cycles = 0;
    @(negedge clk);
    check(ready, "ready before start");
    datain = d;
    datainvalid = 1'b1;
    @(negedge clk);
    datainvalid = 1'b0;
    cycles = 1;
    check(!ready, "ready low while busy");
    // a start request while busy must be ignored
    datain = ~d;
    datainvalid = 1'b1;
    @(negedge clk);
    datainvalid = 1'b0;
    cycles++;
    while (!outvalid && cycles < 200) begin
      @(negedge clk);
      cycles++;
    end
    check(cycles == LATENCY, $sformatf("latency %0d cycles, expected %0d", cycles, LATENCY));
    check(dataout == expected, $sformatf("dataout %h expected %h", dataout, expected));
    @(negedge clk);
    check(!outvalid && ready, "outvalid is a pulse, ready again");
    repeat (3) @(negedge clk);
    check(dataout == expected, "dataout holds");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    check(!keysvalid && !ready && !outvalid, "reset state");
    rst = 1'b0;
    // start before the key is ready is ignored
    @(negedge clk);
    datainvalid = 1'b1;
    @(negedge clk);
    datainvalid = 1'b0;
    repeat (50) @(negedge clk);
    check(!outvalid && dataout == '0, "no block accepted without keys");
    load_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    run(128'h3243f6a8885a308d313198a2e0370734, 128'h3925841d02dc09fbdc118597196a0b32);
    load_key(128'h000102030405060708090a0b0c0d0e0f);
    run(128'h00112233445566778899aabbccddeeff, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    for (int n = 0; n < 20; n++) begin
      automatic logic [127:0] k = {$urandom, $urandom, $urandom, $urandom};
      load_key(k);
      for (int b = 0; b < 3; b++) begin
        automatic logic [127:0] d = {$urandom, $urandom, $urandom, $urandom};
        run(d, ref_encrypt(d, k));
      end
    end
    // sustained rate: datainvalid held high, one result every LATENCY cycles
    begin
      automatic int last_t = -1, t = 0, n_out = 0;
      automatic logic [127:0] k = {$urandom, $urandom, $urandom, $urandom};
      automatic logic [127:0] d = {$urandom, $urandom, $urandom, $urandom};
      load_key(k);
      @(negedge clk);
      datain = d;
      datainvalid = 1'b1;
      while (n_out < 8 && t < 1000) begin
        @(negedge clk);
        t++;
        if (outvalid) begin
          check(dataout == ref_encrypt(d, k), "result under sustained load");
          if (last_t >= 0) check(t - last_t == LATENCY, $sformatf("result interval %0d, expected %0d", t - last_t, LATENCY));
          last_t = t;
          n_out++;
        end
      end
      datainvalid = 1'b0;
      check(n_out == 8, "eight results under sustained load");
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
