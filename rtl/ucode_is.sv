// ucode_is -- microcoded controller with instruction sequencing.
//
// Instead of one ROM word per {state, input} combination, the ROM holds one
// word per state, addressed by a micro-program counter (uPC).  A word is
// {br_inst[J-1:0], br_target[K-1:0], outputs[M-1:0]}.  Each cycle the branch
// logic evaluates br_inst against the inputs; the sequencer then loads the
// target if the branch is taken and uPC + 1 if not (0 during the synchronous
// reset).  At the same edge the output field is registered, so `out` shows
// the outputs of the word addressed in the previous cycle.
//
// Defaults are the lecture's left-turn controller: inputs in[0] = left-turn
// car and in[1] = east-west car, outputs {ns, lt, ew} lights of {g, y, r},
// a 4-bit uPC and 3-bit branch instructions.  ucode_pkg::IS_ALTERNATE_CODE
// is the shorter program that uses "branch if no input" (bna).  Structure and
// formats follow the lecture; the output register has no reset.
module ucode_is #(
  parameter int N = ucode_pkg::IS_N,
  parameter int M = ucode_pkg::IS_M,
  parameter int K = ucode_pkg::IS_K,
  parameter int J = ucode_pkg::IS_J,
  parameter logic [J+K+M-1:0] CODE [2**K] = ucode_pkg::IS_LEFT_TURN_CODE
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] in,
  output logic [M-1:0] out,
  output logic [K-1:0] upc,
  output logic         branch
);

  logic [J+K+M-1:0] uinst;
  logic [J-1:0]     brinst;
  logic [K-1:0]     br_upc;
  logic [M-1:0]     nxt_out;

  assign {brinst, br_upc, nxt_out} = uinst;

  ucode_rom #(.AW(K), .DW(J + K + M), .CODE(CODE)) u_rom (
    .addr (upc),
    .data (uinst)
  );

  is_branch_logic #(.N(J - 1)) u_branch (
    .brinst (brinst),
    .in     (in[J-2:0]),
    .branch (branch)
  );

  ucode_sequencer #(.K(K)) u_seq (
    .clk    (clk),
    .rst    (rst),
    .branch (branch),
    .target (br_upc),
    .upc    (upc)
  );

  always_ff @(posedge clk) out <= nxt_out;

  initial assert (J == N + 1) else $error("ucode_is: J must be N + 1");

endmodule
