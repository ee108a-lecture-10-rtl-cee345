// mi_output_decode -- register-enable decoder of the brx/ldx microcode
// controller.
//
// An ldx instruction (opcode 0) writes its value field into one register,
// the one whose enable is bit `dest` of `en` (one-hot); destinations beyond
// the E registers write nothing.  A brx instruction (opcode 1) enables no
// register.  Combinational.  With the default E = 4 the enables are NS
// light, EW light, LT light and timer, as in the lecture.
module mi_output_decode #(
  parameter int E = 4
) (
  input  logic         opcode,
  input  logic [2:0]   dest,
  output logic [E-1:0] en
);

  always_comb begin
    en = '0;
    if (!opcode)
      for (int i = 0; i < E; i++)
        en[i] = (dest == 3'(i));
  end

endmodule
