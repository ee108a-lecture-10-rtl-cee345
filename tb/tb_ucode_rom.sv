// tb_ucode_rom -- checks the microcode store and the ROM images it is given.
//
// Four ROM instances hold the flat basic, flat improved, sequenced left-turn
// and sequenced alternate programs.  Every address is read and compared with
// the bit patterns of the published microcode tables, typed here as plain
// binary words, so both the ROM's read path and the program encoding in
// ucode_pkg are checked.
module tb_ucode_rom;
  import ucode_pkg::*;

  int checks = 0, failures = 0;

  logic [2:0]  a_basic;  logic [7:0]  d_basic;
  logic [3:0]  a_impr;   logic [8:0]  d_impr;
  logic [3:0]  a_lt;     logic [15:0] d_lt;
  logic [3:0]  a_alt;    logic [15:0] d_alt;

  ucode_rom u_basic (.addr(a_basic), .data(d_basic));
  ucode_rom #(.AW(4), .DW(9),  .CODE(TLC_IMPROVED_CODE)) u_impr (.addr(a_impr), .data(d_impr));
  ucode_rom #(.AW(4), .DW(16), .CODE(IS_LEFT_TURN_CODE)) u_lt   (.addr(a_lt),   .data(d_lt));
  ucode_rom #(.AW(4), .DW(16), .CODE(IS_ALTERNATE_CODE)) u_alt  (.addr(a_alt),  .data(d_alt));

  localparam logic [7:0] EXP_BASIC [8] = '{
    8'b00100001, 8'b01100001, 8'b10010001, 8'b10010001,
    8'b11001100, 8'b11001100, 8'b00001010, 8'b00001010};
  localparam logic [8:0] EXP_IMPR [16] = '{
    9'b001100001, 9'b001100001, 9'b010100001, 9'b010100001,
    9'b010100001, 9'b011100001, 9'b100010001, 9'b100010001,
    9'b101001001, 9'b101001001, 9'b110001100, 9'b101001100,
    9'b111001010, 9'b111001010, 9'b000001001, 9'b000001001};
  localparam logic [15:0] EXP_LT [8] = '{
    16'b0010101100001001, 16'b1100000100001001, 16'b0000000010001001,
    16'b0100011001001100, 16'b1000000001001010, 16'b0000000010001001,
    16'b0010110001100001, 16'b1000000001010001};
  localparam logic [15:0] EXP_ALT [6] = '{
    16'b1110000100001001, 16'b0010100010001001, 16'b0100010001001100,
    16'b1000000001001010, 16'b0010100001100001, 16'b1000000001010001};

  task automatic check(string what, int addr, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s addr %0d: got %b expected %b", what, addr, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      a_basic = 3'(i); #1;
      check("basic", i, 16'(d_basic), 16'(EXP_BASIC[i]));
    end
    for (int i = 0; i < 16; i++) begin
      a_impr = 4'(i); #1;
      check("improved", i, 16'(d_impr), 16'(EXP_IMPR[i]));
    end
    for (int i = 0; i < 8; i++) begin
      a_lt = 4'(i); #1;
      check("left-turn", i, d_lt, EXP_LT[i]);
    end
    for (int i = 0; i < 6; i++) begin
      a_alt = 4'(i); #1;
      check("alternate", i, d_alt, EXP_ALT[i]);
    end
    // unused words of the sequenced programs jump to 0 with all lights red
    for (int i = 8; i < 16; i++) begin
      a_lt = 4'(i); #1;
      check("left-turn fill", i, d_lt, 16'b100_0000_001001001);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
