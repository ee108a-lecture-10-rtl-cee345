// tb_mi_output_decode -- exhaustive check of the ldx destination decoder:
// ldns, ldew, ldlt and ltim (destinations 0..3) each enable exactly their
// own register, destinations 4..7 enable none, and a branch enables none.
module tb_mi_output_decode;
  int checks = 0, failures = 0;
  logic       opcode;
  logic [2:0] dest;
  logic [3:0] en;

  mi_output_decode dut (.opcode, .dest, .en);

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] exp;
    for (int v = 0; v < 16; v++) begin
      {opcode, dest} = 4'(v); #1;
      case ({opcode, dest})
        4'b0000: exp = 4'b0001;   // ldns
        4'b0001: exp = 4'b0010;   // ldew
        4'b0010: exp = 4'b0100;   // ldlt
        4'b0011: exp = 4'b1000;   // ltim
        default: exp = 4'b0000;
      endcase
      checks++;
      if (en !== exp) begin
        failures++;
        $display("FAIL opcode=%b dest=%0d en=%b expected %b", opcode, dest, en, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
