// ref_mi_tlc -- timeline reference model of the brx/ldx traffic-light
// controller, written as a sequence of light phases with their lengths in
// clock cycles rather than as microinstructions.
//
// After reset all lights are red for three cycles, then repeatedly:
//   NS green   T_GREEN + 2 cycles, then further cycles until a cycle in
//              which a car (left-turn or east-west) waits, then one more;
//   NS yellow  T_YELLOW + 3 cycles;
//   all red    T_RED + 4 cycles; the left-turn input seen in the first of
//              them picks the left-turn phase, otherwise east-west;
//   green      T_GREEN + 3 cycles (east-west or left-turn);
//   yellow     T_YELLOW + 3 cycles;
//   all red    2 cycles.
// The lengths follow from one clock per microinstruction and a timer loaded
// with T that ends its wait loop after T + 1 cycles.  The model samples the
// inputs and publishes the expected lights {lt, ew, ns} at each falling
// clock edge; inputs must be changed only just after rising edges.  Reset is
// expected once, at the start.  It counts the phase kinds it has seen.
module ref_mi_tlc #(
  parameter int T_GREEN  = 8,
  parameter int T_YELLOW = 3,
  parameter int T_RED    = 1
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] in,
  output logic [8:0] exp_lights,
  output logic       valid,
  output int         n_ns_wait,     // NS green extended waiting for a car
  output int         n_ew_phase,
  output int         n_lt_phase
);
  localparam logic [2:0] G = 3'b100, Y = 3'b010, R = 3'b001;

  logic [2:0] ns, ew, lt;
  assign exp_lights = {lt, ew, ns};

  task automatic hold(int n);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    bit car, left;
    valid = 0; n_ns_wait = 0; n_ew_phase = 0; n_lt_phase = 0;
    ns = R; ew = R; lt = R;
    @(negedge clk);
    while (rst) @(negedge clk);
    // first cycle after reset: now at the negedge of that cycle
    valid = 1;
    hold(2);
    forever begin
      @(negedge clk); ns = G;
      hold(T_GREEN + 1);
      car = 0;
      @(negedge clk); car = (in != 0);
      if (!car) n_ns_wait++;
      while (!car) begin
        @(negedge clk); car = (in != 0);
      end
      @(negedge clk);
      @(negedge clk); ns = Y;
      hold(T_YELLOW + 2);
      @(negedge clk); ns = R; left = in[0];
      hold(T_RED + 3);
      @(negedge clk);
      if (left) begin lt = G; n_lt_phase++; end
      else      begin ew = G; n_ew_phase++; end
      hold(T_GREEN + 2);
      @(negedge clk);
      if (left) lt = Y; else ew = Y;
      hold(T_YELLOW + 2);
      @(negedge clk);
      if (left) lt = R; else ew = R;
      hold(1);
    end
  end
endmodule
