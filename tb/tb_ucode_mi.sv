// tb_ucode_mi -- checks the brx/ldx microcoded controller against a
// timeline model of its light phases (ref_mi_tlc), cycle by cycle.
//
// Inputs are random and held for random stretches so that north-south green
// sometimes has to wait for a car, and both the east-west and the left-turn
// phases are taken.  Phase lengths derive from the timer constants, so the
// check covers the timer's cycle count.  Also checked: never two directions
// non-red at once, and every instruction kind (each load destination, bntz,
// brnle, blt taken and not taken, br) executed at least once.
module tb_ucode_mi;
  import ucode_pkg::*;

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_exec [32];
  int n_taken [32];

  logic       clk = 0, rst = 1;
  logic [1:0] in = 0;
  logic [8:0] out, exp_out;
  logic [4:0] upc;
  logic       branch, done, valid;
  int         n_wait, n_ew, n_lt;

  ucode_mi dut (.clk, .rst, .in, .out, .upc, .branch, .done);

  ref_mi_tlc #(.T_GREEN(int'(T_GREEN)), .T_YELLOW(int'(T_YELLOW)), .T_RED(int'(T_RED))) ref_m (
    .clk, .rst, .in, .exp_lights(exp_out), .valid,
    .n_ns_wait(n_wait), .n_ew_phase(n_ew), .n_lt_phase(n_lt));

  always #5 clk = ~clk;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  function automatic int nonred(logic [8:0] l);
    return int'(l[8:6] != 3'b001) + int'(l[5:3] != 3'b001) + int'(l[2:0] != 3'b001);
  endfunction

  always @(negedge clk) begin
    cyc++;
    #1;
    if (valid) begin
      check($sformatf("lights lt/ew/ns %b_%b_%b exp %b_%b_%b upc %0d", out[8:6], out[5:3], out[2:0],
                      exp_out[8:6], exp_out[5:3], exp_out[2:0], upc), out == exp_out);
      check("one direction at a time", nonred(out) <= 1);
      n_exec[upc]++;
      if (branch) n_taken[upc]++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int len;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 8000; i += len) begin
      len = $urandom_range(1, 40);
      in  = 2'($urandom);
      repeat (len) @(posedge clk);
      #1;
    end
    check($sformatf("phases: ns waits %0d, ew %0d, lt %0d", n_wait, n_ew, n_lt),
          n_wait > 0 && n_ew > 0 && n_lt > 0);
    check("ldlt/ldew/ldns/ltim executed", n_exec[0] > 0 && n_exec[1] > 0 && n_exec[2] > 0 && n_exec[3] > 0);
    check("bntz looped and fell through", n_taken[4] > 0 && n_exec[4] > n_taken[4]);
    check("brnle looped and fell through", n_taken[5] > 0 && n_exec[5] > n_taken[5]);
    check("blt taken and not taken", n_taken[10] > 0 && n_exec[10] > n_taken[10]);
    check("br always taken", n_exec[20] > 0 && n_taken[20] == n_exec[20] && n_exec[30] > 0
                             && n_taken[30] == n_exec[30]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
