// mi_branch_logic -- branch condition of the two-instruction-type (brx/ldx)
// microcode controller.
//
// For a brx instruction (opcode 1) the 3-bit condition field selects, with
// its low two bits, one of: 0 left-turn car (in[0]), 1 east-west car
// (in[1]), 2 either car, 3 timer done; bit 2 inverts the selection.  An ldx
// instruction (opcode 0) never branches, so the uPC moves to the next word.
// Combinational.  The decode follows the lecture; the invert is applied to
// the selected condition as a whole, which is what the instruction names
// (bntz, brnle) require.
module mi_branch_logic (
  input  logic       opcode,
  input  logic [2:0] cond,
  input  logic [1:0] in,
  input  logic       done,
  output logic       branch
);

  logic sel;

  always_comb begin
    unique case (cond[1:0])
      2'd0:    sel = in[0];
      2'd1:    sel = in[1];
      2'd2:    sel = in[0] | in[1];
      default: sel = done;
    endcase
  end

  assign branch = opcode & (sel ^ cond[2]);

endmodule
