// tb_is_branch_logic -- exhaustive check of the sequenced controller's
// branch condition against the branch instruction table: nop never branches,
// br always, brlt / brnlt on the left-turn input (in[0]) and its inverse,
// brew / brnew on the east-west input (in[1]) and its inverse, bna when
// neither input is present and 011 when either is.
module tb_is_branch_logic;
  int checks = 0, failures = 0;
  logic [2:0] brinst;
  logic [1:0] in;
  logic       branch;

  is_branch_logic dut (.brinst, .in, .branch);

  function automatic bit expected(logic [2:0] b, logic lt, logic ew);
    case (b)
      3'b000: return 0;          // nop
      3'b100: return 1;          // br
      3'b001: return lt;         // brlt
      3'b101: return !lt;        // brnlt
      3'b010: return ew;         // brew
      3'b110: return !ew;        // brnew
      3'b111: return !lt && !ew; // bna
      default: return lt || ew;  // 011
    endcase
  endfunction

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 8; b++)
      for (int i = 0; i < 4; i++) begin
        brinst = 3'(b); in = 2'(i); #1;
        checks++;
        if (branch !== expected(brinst, in[0], in[1])) begin
          failures++;
          $display("FAIL brinst=%b in=%b branch=%b", brinst, in, branch);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
