// microcode_top -- the three microcoded traffic-light controller styles,
// side by side, each running its microprogram.
//
//   flat      ucode_tlc, basic program      car_ew -> {ns, ew}
//   flat2     ucode_tlc, improved program   car_ew -> {ns, ew}
//   seq       ucode_is,  left-turn program  {car_ew, lt} -> {ns, lt, ew}
//   seq_alt   ucode_is,  alternate program  {car_ew, lt} -> {ns, lt, ew}
//   mi        ucode_mi,  brx/ldx program    {car_ew, lt} -> {lt, ew, ns}
//
// All share one clock and one synchronous reset; otherwise the five are
// independent, each with its own inputs and outputs.  Lights are {g, y, r}.
// Every controller registers its outputs, so a light changes one clock after
// the state or microinstruction that sets it.  Besides the lights the state
// (or uPC), the branch decision and the brx/ldx timer's done flag are brought
// out for observation.
module microcode_top (
  input  logic       clk,
  input  logic       rst,

  input  logic       flat_car_ew,
  output logic [5:0] flat_lights,
  output logic [1:0] flat_state,

  input  logic       flat2_car_ew,
  output logic [5:0] flat2_lights,
  output logic [2:0] flat2_state,

  input  logic [1:0] seq_in,
  output logic [8:0] seq_lights,
  output logic [3:0] seq_upc,
  output logic       seq_branch,

  input  logic [1:0] seq_alt_in,
  output logic [8:0] seq_alt_lights,
  output logic [3:0] seq_alt_upc,
  output logic       seq_alt_branch,

  input  logic [1:0] mi_in,
  output logic [8:0] mi_lights,
  output logic [4:0] mi_upc,
  output logic       mi_branch,
  output logic       mi_done
);

  import ucode_pkg::*;

  ucode_tlc u_flat (
    .clk, .rst, .in(flat_car_ew), .out(flat_lights), .state(flat_state)
  );

  ucode_tlc #(.K(TLC2_K), .CODE(TLC_IMPROVED_CODE)) u_flat2 (
    .clk, .rst, .in(flat2_car_ew), .out(flat2_lights), .state(flat2_state)
  );

  ucode_is u_seq (
    .clk, .rst, .in(seq_in), .out(seq_lights), .upc(seq_upc), .branch(seq_branch)
  );

  ucode_is #(.CODE(IS_ALTERNATE_CODE)) u_seq_alt (
    .clk, .rst, .in(seq_alt_in), .out(seq_alt_lights), .upc(seq_alt_upc),
    .branch(seq_alt_branch)
  );

  ucode_mi u_mi (
    .clk, .rst, .in(mi_in), .out(mi_lights), .upc(mi_upc), .branch(mi_branch),
    .done(mi_done)
  );

endmodule
