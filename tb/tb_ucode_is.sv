// tb_ucode_is -- checks the sequenced (uPC + branch) controller with the
// left-turn program and with the alternate program against state-level
// reference models.
//
// The left-turn controller first replays the published input sequence (00,
// then 01, 10, 00, 11, each for a few cycles) and must visit uPC 0, 1, 0,
// 5, 6 ... as published.  Then both controllers get 3000 cycles of random
// inputs with occasional resets; uPC and lights are compared with the models
// every cycle, no two directions may ever be non-red together, and every
// branch instruction must be seen both taken and not taken where it can be.
module tb_ucode_is;
  import ucode_pkg::*;

  int checks = 0, failures = 0;
  int cyc = 0;
  int taken_a [16], fall_a [16], taken_b [16], fall_b [16];

  logic       clk = 0, rst = 1;
  logic [1:0] in_a = 0, in_b = 0;
  logic [8:0] out_a, out_b, exp_out_a, exp_out_b;
  logic [3:0] upc_a, upc_b, exp_upc_a, exp_upc_b;
  logic       br_a, br_b, val_a, val_b;

  ucode_is dut_a (.clk, .rst, .in(in_a), .out(out_a), .upc(upc_a), .branch(br_a));
  ucode_is #(.CODE(IS_ALTERNATE_CODE)) dut_b (
    .clk, .rst, .in(in_b), .out(out_b), .upc(upc_b), .branch(br_b));

  ref_seq_tlc #(.ALT(0)) ref_a (.clk, .rst, .in(in_a), .exp_upc(exp_upc_a),
                                .exp_lights(exp_out_a), .valid(val_a));
  ref_seq_tlc #(.ALT(1)) ref_b (.clk, .rst, .in(in_b), .exp_upc(exp_upc_b),
                                .exp_lights(exp_out_b), .valid(val_b));

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
    if (val_a) begin
      check($sformatf("left-turn upc %0d exp %0d", upc_a, exp_upc_a), upc_a == exp_upc_a);
      check($sformatf("left-turn lights %b exp %b", out_a, exp_out_a), out_a == exp_out_a);
      check("left-turn one direction at a time", nonred(out_a) <= 1);
    end
    if (val_b) begin
      check($sformatf("alternate upc %0d exp %0d", upc_b, exp_upc_b), upc_b == exp_upc_b);
      check($sformatf("alternate lights %b exp %b", out_b, exp_out_b), out_b == exp_out_b);
      check("alternate one direction at a time", nonred(out_b) <= 1);
    end
    if (!rst) begin
      if (br_a) taken_a[upc_a]++; else fall_a[upc_a]++;
      if (br_b) taken_b[upc_b]++; else fall_b[upc_b]++;
    end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [3:0] TRACE_UPC [12] = '{0, 1, 0, 5, 6, 6, 7, 0, 1, 2, 3, 3};

  initial begin
    @(posedge clk); #1 rst = 0; in_a = 2'b00;
    for (int i = 0; i < 12; i++) begin
      @(negedge clk);
      check($sformatf("trace upc[%0d]=%0d exp %0d", i, upc_a, TRACE_UPC[i]), upc_a == TRACE_UPC[i]);
      @(posedge clk); #1;
      case (i)
        1: in_a = 2'b01;    // left-turn car
        4: in_a = 2'b10;    // east-west car
        default: ;
      endcase
    end
    for (int i = 0; i < 3000; i++) begin
      #1;
      rst = ($urandom_range(0, 199) == 0);
      if ($urandom_range(0, 3) == 0) in_a = 2'($urandom);
      if ($urandom_range(0, 3) == 0) in_b = 2'($urandom);
      @(posedge clk);
    end
    // conditional branches, seen both ways
    check("brlt NS1 both ways",  taken_a[0] > 0 && fall_a[0] > 0);
    check("brnew NS2 both ways", taken_a[1] > 0 && fall_a[1] > 0);
    check("brew EW2 both ways",  taken_a[3] > 0 && fall_a[3] > 0);
    check("brlt LT2 both ways",  taken_a[6] > 0 && fall_a[6] > 0);
    check("nop and br",          fall_a[2] > 0 && taken_a[4] > 0 && fall_a[5] > 0 && taken_a[7] > 0);
    check("bna NS1 both ways",   taken_b[0] > 0 && fall_b[0] > 0);
    check("alt brlt/brew",       taken_b[1] > 0 && fall_b[1] > 0 && taken_b[2] > 0 && fall_b[2] > 0
                                 && taken_b[4] > 0 && fall_b[4] > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
