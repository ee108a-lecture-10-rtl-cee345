// ucode_sequencer -- micro-program counter (uPC) of a sequenced microcode
// controller.
//
// The uPC is the state of the controller.  Each clock edge it loads one of
// three candidates through a three-input multiplexer with a one-hot select:
// 0 while `rst` is high, the branch target when `branch` is high, and
// uPC + 1 otherwise, so a microprogram runs straight through its words
// unless a branch instruction redirects it.  Reset is synchronous and takes
// priority over a branch.
//
// Interface: `branch` and `target` come from the branch logic and the
// current microinstruction; `upc` addresses the microcode store.  The uPC
// wraps from 2**K-1 to 0.  Structure (incrementer, Mux3 with inputs +1,
// target and 0, uPC register) follows the lecture's sequencer diagrams.
module ucode_sequencer #(
  parameter int K = ucode_pkg::IS_K
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         branch,
  input  logic [K-1:0] target,
  output logic [K-1:0] upc
);

  logic [2:0]   sel;       // one-hot: [0] = uPC+1, [1] = target, [2] = zero
  logic [K-1:0] nupc;

  always_comb begin
    if (rst)         sel = 3'b100;
    else if (branch) sel = 3'b010;
    else             sel = 3'b001;
  end

  always_comb begin
    unique case (1'b1)
      sel[2]:  nupc = '0;
      sel[1]:  nupc = target;
      sel[0]:  nupc = upc + 1'b1;
      default: nupc = '0;
    endcase
  end

  always_ff @(posedge clk) upc <= nupc;

endmodule
