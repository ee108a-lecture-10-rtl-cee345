// is_branch_logic -- branch condition of the sequenced (uPC + branch)
// microcode controller.
//
// A branch instruction has one select bit per input and an invert bit on
// top: branch = (OR over i of brinst[i] & in[i]) XOR brinst[N].  With two
// inputs (in[0] = left-turn car, in[1] = east-west car) this yields the
// lecture's branch set: 000 nop, 100 always, 001 brlt, 101 brnlt, 010 brew,
// 110 brnew, 111 bna (no input) and 011 (either input).  Purely
// combinational; the result steers the uPC multiplexer in the same cycle.
module is_branch_logic #(
  parameter int N = ucode_pkg::IS_N
) (
  input  logic [N:0]   brinst,
  input  logic [N-1:0] in,
  output logic         branch
);

  assign branch = (|(brinst[N-1:0] & in)) ^ brinst[N];

endmodule
