// ucode_tlc -- finite-state machine realised as a memory array (flat
// microcode).
//
// The whole state table sits in a ROM: the address is {state, inputs} and
// each word is {next state, outputs}.  The ROM therefore replaces the
// next-state and output logic of an ordinary FSM with its complete truth
// table (2**(K+N) words of K+M bits).  Two registers close the loop: the
// state register takes the next-state field (or 0 while `rst` is high,
// synchronous reset) and the output register takes the output field, both at
// the same clock edge.  `out` is thus the output of the state held in the
// previous cycle, one clock behind `state`.
//
// Parameters: N input bits, M output bits, K state bits and the ROM image
// CODE.  The defaults are the lecture's basic traffic-light controller
// (car_ew in, {ns, ew} lights out, four states); ucode_pkg also holds the
// eight-state improved controller (K = 3).  The structure follows the
// lecture; the output register has no reset (it is loaded every clock,
// including during reset).
module ucode_tlc #(
  parameter int N = ucode_pkg::TLC_N,
  parameter int M = ucode_pkg::TLC_M,
  parameter int K = ucode_pkg::TLC_K,
  parameter logic [K+M-1:0] CODE [2**(K+N)] = ucode_pkg::TLC_BASIC_CODE
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] in,
  output logic [M-1:0] out,
  output logic [K-1:0] state
);

  logic [K+M-1:0] uinst;
  logic [K-1:0]   next;

  ucode_rom #(.AW(K + N), .DW(K + M), .CODE(CODE)) u_rom (
    .addr ({state, in}),
    .data (uinst)
  );

  assign next = rst ? '0 : uinst[K+M-1:M];

  always_ff @(posedge clk) begin
    state <= next;
    out   <= uinst[M-1:0];
  end

endmodule
