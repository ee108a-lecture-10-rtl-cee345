// tb_microcode_top -- end-to-end test of all five controllers in
// microcode_top at their default sizes and programs.
//
// One reset, then 6000 cycles of random inputs (held for random stretches)
// on every controller.  Each controller is compared every cycle with its
// reference model: the state-diagram models of the two flat and two
// sequenced controllers and the phase-timeline model of the brx/ldx
// controller.  The test counts how often each mechanism happened and fails
// if one never did: input-dependent ROM transitions (hold and leave) in the
// flat controllers, branches taken and not taken in the sequenced ones, the
// bna instruction, timer waits, waits for a car and both the east-west and
// the left-turn phase of the brx/ldx controller.
module tb_microcode_top;
  int checks = 0, failures = 0;
  int cyc = 0;

  logic       clk = 0, rst = 1;
  logic       flat_car_ew = 0, flat2_car_ew = 0;
  logic [1:0] seq_in = 0, seq_alt_in = 0, mi_in = 0;
  logic [5:0] flat_lights, flat2_lights, e_flat, e_flat2;
  logic [1:0] flat_state;
  logic [2:0] flat2_state, e_flat_st, e_flat2_st;
  logic [8:0] seq_lights, seq_alt_lights, mi_lights, e_seq, e_seq_alt, e_mi;
  logic [3:0] seq_upc, seq_alt_upc, e_seq_upc, e_seq_alt_upc;
  logic [4:0] mi_upc;
  logic       seq_branch, seq_alt_branch, mi_branch, mi_done;
  logic       v_flat, v_flat2, v_seq, v_seq_alt, v_mi;
  int         n_wait, n_ew, n_lt;

  int n_flat_hold = 0, n_flat_leave = 0, n_flat2_hold = 0, n_flat2_leave = 0;
  int n_seq_taken = 0, n_seq_fall = 0, n_bna_taken = 0, n_bna_fall = 0;
  int n_timer_wait = 0, n_mi_load = 0;

  microcode_top dut (.*);

  ref_flat_tlc #(.IMPROVED(0)) r_flat  (.clk, .rst, .car_ew(flat_car_ew),
    .exp_state(e_flat_st), .exp_lights(e_flat), .valid(v_flat));
  ref_flat_tlc #(.IMPROVED(1)) r_flat2 (.clk, .rst, .car_ew(flat2_car_ew),
    .exp_state(e_flat2_st), .exp_lights(e_flat2), .valid(v_flat2));
  ref_seq_tlc #(.ALT(0)) r_seq (.clk, .rst, .in(seq_in),
    .exp_upc(e_seq_upc), .exp_lights(e_seq), .valid(v_seq));
  ref_seq_tlc #(.ALT(1)) r_seq_alt (.clk, .rst, .in(seq_alt_in),
    .exp_upc(e_seq_alt_upc), .exp_lights(e_seq_alt), .valid(v_seq_alt));
  ref_mi_tlc #(.T_GREEN(int'(ucode_pkg::T_GREEN)), .T_YELLOW(int'(ucode_pkg::T_YELLOW)),
               .T_RED(int'(ucode_pkg::T_RED))) r_mi (
    .clk, .rst, .in(mi_in), .exp_lights(e_mi), .valid(v_mi),
    .n_ns_wait(n_wait), .n_ew_phase(n_ew), .n_lt_phase(n_lt));

  always #5 clk = ~clk;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  always @(negedge clk) begin
    cyc++;
    #1;
    if (v_flat) begin
      check("flat state",  3'(flat_state) == e_flat_st);
      check("flat lights", flat_lights == e_flat);
    end
    if (v_flat2) begin
      check("flat2 state",  flat2_state == e_flat2_st);
      check("flat2 lights", flat2_lights == e_flat2);
    end
    if (v_seq) begin
      check("seq upc",    seq_upc == e_seq_upc);
      check("seq lights", seq_lights == e_seq);
    end
    if (v_seq_alt) begin
      check("seq_alt upc",    seq_alt_upc == e_seq_alt_upc);
      check("seq_alt lights", seq_alt_lights == e_seq_alt);
    end
    if (v_mi) check($sformatf("mi lights %b exp %b", mi_lights, e_mi), mi_lights == e_mi);
    if (!rst) begin
      if (flat_state == 2'd0) begin
        if (flat_car_ew) n_flat_leave++; else n_flat_hold++;
      end
      if (flat2_state == 3'd2) begin
        if (flat2_car_ew) n_flat2_leave++; else n_flat2_hold++;
      end
      if (seq_upc inside {4'd0, 4'd1, 4'd3, 4'd6}) begin
        if (seq_branch) n_seq_taken++; else n_seq_fall++;
      end
      if (seq_alt_upc == 4'd0) begin
        if (seq_alt_branch) n_bna_taken++; else n_bna_fall++;
      end
      if (mi_branch && !mi_done) n_timer_wait++;
      if (!dut.u_mi.opcode) n_mi_load++;
    end
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int len;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 6000; i += len) begin
      len = $urandom_range(1, 30);
      flat_car_ew  = 1'($urandom);
      flat2_car_ew = 1'($urandom);
      seq_in       = 2'($urandom);
      seq_alt_in   = 2'($urandom);
      mi_in        = 2'($urandom);
      repeat (len) @(posedge clk);
      #1;
    end
    $display("flat hold %0d leave %0d | flat2 hold %0d leave %0d | seq taken %0d fall %0d | bna taken %0d fall %0d",
             n_flat_hold, n_flat_leave, n_flat2_hold, n_flat2_leave, n_seq_taken, n_seq_fall,
             n_bna_taken, n_bna_fall);
    $display("mi timer waits %0d loads %0d car waits %0d ew phases %0d lt phases %0d",
             n_timer_wait, n_mi_load, n_wait, n_ew, n_lt);
    check("flat ROM transitions",   n_flat_hold > 0 && n_flat_leave > 0);
    check("flat2 ROM transitions",  n_flat2_hold > 0 && n_flat2_leave > 0);
    check("seq branches",           n_seq_taken > 0 && n_seq_fall > 0);
    check("bna branch",             n_bna_taken > 0 && n_bna_fall > 0);
    check("mi timer waits",         n_timer_wait > 0);
    check("mi register loads",      n_mi_load > 0);
    check("mi car wait and phases", n_wait > 0 && n_ew > 0 && n_lt > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
