// tb_ucode_timer -- checks the loadable down-counting timer.
//
// After reset `done` must be high.  For a range of load values N the
// testbench pulses `load` for one clock and counts the clocks until `done`
// rises again, which must be exactly N after the loading edge (and done must fall right after a
// non-zero load).  A reload in mid-count must restart the count, and a load
// of zero must leave done high.
module tb_ucode_timer;
  int checks = 0, failures = 0;
  int cycles = 0;

  logic       clk = 0, rst = 1, load = 0;
  logic [4:0] value = '0;
  logic       done;

  ucode_timer dut (.clk, .rst, .load, .value, .done);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cycles);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_load(int n);
    int t;
    @(negedge clk); load = 1; value = 5'(n);
    @(negedge clk); load = 0;
    t = 0;
    if (n != 0) check($sformatf("done low after load %0d", n), done == 0);
    while (!done && t < 100) begin
      @(negedge clk); t++;
    end
    // the count reaches zero n clock edges after the loading edge
    check($sformatf("load %0d took %0d clocks", n, t), t == n);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    check("done after reset", done == 1);
    for (int n = 0; n < 32; n++) run_load(n);
    // reload in mid-count
    @(negedge clk); load = 1; value = 5'd20;
    @(negedge clk); load = 0;
    repeat (5) @(negedge clk);
    load = 1; value = 5'd4;
    @(negedge clk); load = 0;
    repeat (3) @(negedge clk);
    check("reload not done yet", done == 0);
    @(negedge clk);
    check("reload done after 4", done == 1);
    // reset clears a running count
    @(negedge clk); load = 1; value = 5'd9;
    @(negedge clk); load = 0; rst = 1;
    @(negedge clk); rst = 0;
    check("reset clears count", done == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
