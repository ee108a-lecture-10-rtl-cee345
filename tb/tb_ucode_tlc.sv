// tb_ucode_tlc -- checks the flat (ROM) microcoded controller with both of
// its programs against state-diagram reference models.
//
// The basic controller first replays the published simulation: one reset
// cycle, then car_ew low, high for four cycles and low again, which must give
// states 0, 0, 1, 2, 3, 0 and lights (octal) 41, 21, 14, 12 one cycle
// behind.  Then both controllers run 3000 cycles of random car_ew with an
// occasional reset, and every cycle the state and lights are compared with
// the models.  Each transition kind (hold and leave in every waiting state)
// must occur at least once.
module tb_ucode_tlc;
  import ucode_pkg::*;

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_hold_gns = 0, n_leave_gns = 0, n_hold_gns3 = 0, n_hold_gew = 0, n_leave_gew = 0;

  logic       clk = 0, rst = 1;
  logic       car_a = 0, car_b = 0;
  logic [5:0] out_a, out_b, exp_out_a, exp_out_b;
  logic [1:0] st_a;
  logic [2:0] st_b, exp_st_a, exp_st_b;
  logic       val_a, val_b;

  ucode_tlc dut_a (.clk, .rst, .in(car_a), .out(out_a), .state(st_a));
  ucode_tlc #(.K(TLC2_K), .CODE(TLC_IMPROVED_CODE)) dut_b (
    .clk, .rst, .in(car_b), .out(out_b), .state(st_b));

  ref_flat_tlc #(.IMPROVED(0)) ref_a (.clk, .rst, .car_ew(car_a),
    .exp_state(exp_st_a), .exp_lights(exp_out_a), .valid(val_a));
  ref_flat_tlc #(.IMPROVED(1)) ref_b (.clk, .rst, .car_ew(car_b),
    .exp_state(exp_st_b), .exp_lights(exp_out_b), .valid(val_b));

  always #5 clk = ~clk;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  // compare with the models in the middle of every cycle
  always @(negedge clk) begin
    cyc++;
    if (val_a) begin
      check($sformatf("basic state %0d exp %0d", st_a, exp_st_a), 3'(st_a) == exp_st_a);
      check($sformatf("basic lights %o exp %o", out_a, exp_out_a), out_a == exp_out_a);
    end
    if (val_b) begin
      check($sformatf("improved state %0d exp %0d", st_b, exp_st_b), st_b == exp_st_b);
      check($sformatf("improved lights %o exp %o", out_b, exp_out_b), out_b == exp_out_b);
    end
    if (!rst) begin
      if (st_a == 2'd0 && !car_a) n_hold_gns++;
      if (st_a == 2'd0 &&  car_a) n_leave_gns++;
      if (st_b == 3'd2 && !car_b) n_hold_gns3++;
      if (st_b == 3'd5 &&  car_b) n_hold_gew++;
      if (st_b == 3'd5 && !car_b) n_leave_gew++;
    end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [1:0] TRACE_STATE [6] = '{0, 0, 1, 2, 3, 0};
  localparam logic [5:0] TRACE_OUT   [5] = '{6'o41, 6'o41, 6'o21, 6'o14, 6'o12};

  initial begin
    // published trace
    @(posedge clk); #1 rst = 0; car_a = 0;          // after one reset edge
    @(negedge clk); check("trace state 0", st_a == TRACE_STATE[0]);
    @(posedge clk); #1 car_a = 1;
    for (int i = 1; i < 6; i++) begin
      @(negedge clk);
      check($sformatf("trace state[%0d]=%0d", i, st_a), st_a == TRACE_STATE[i]);
      check($sformatf("trace out[%0d]=%o", i - 1, out_a), out_a == TRACE_OUT[i - 1]);
      if (i == 4) begin @(posedge clk); #1 car_a = 0; end
      else @(posedge clk);
    end
    // random run
    for (int i = 0; i < 3000; i++) begin
      #1;
      rst   = ($urandom_range(0, 199) == 0);
      car_a = ($urandom_range(0, 2) == 0);
      car_b = ($urandom_range(0, 1) == 0);
      @(posedge clk);
    end
    check($sformatf("mechanisms: hold gns %0d, leave gns %0d, hold GNS3 %0d, hold GEW %0d, leave GEW %0d",
                    n_hold_gns, n_leave_gns, n_hold_gns3, n_hold_gew, n_leave_gew),
          n_hold_gns > 0 && n_leave_gns > 0 && n_hold_gns3 > 0 && n_hold_gew > 0 && n_leave_gew > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
