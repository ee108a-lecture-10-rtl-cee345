// tb_mi_branch_logic -- exhaustive check of the brx/ldx branch condition.
// A load (opcode 0) must never branch; a brx must follow the named
// conditions blt, bew, ble, btd and their inverses (bntz = branch while the
// timer has not reached zero, brnle = branch while no car waits).
module tb_mi_branch_logic;
  int checks = 0, failures = 0;
  logic       opcode, done, branch;
  logic [2:0] cond;
  logic [1:0] in;

  mi_branch_logic dut (.opcode, .cond, .in, .done, .branch);

  function automatic bit expected(logic op, logic [2:0] c, logic lt, logic ew, logic d);
    bit r;
    if (!op) return 0;
    case (c)
      3'd0: r = lt;
      3'd1: r = ew;
      3'd2: r = lt || ew;
      3'd3: r = d;
      3'd4: r = !lt;
      3'd5: r = !ew;
      3'd6: r = !(lt || ew);
      default: r = !d;
    endcase
    return r;
  endfunction

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      {opcode, cond, in, done} = 7'(v); #1;
      checks++;
      if (branch !== expected(opcode, cond, in[0], in[1], done)) begin
        failures++;
        $display("FAIL op=%b cond=%0d in=%b done=%b branch=%b", opcode, cond, in, done, branch);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
