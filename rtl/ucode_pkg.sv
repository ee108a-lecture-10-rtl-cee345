// ucode_pkg -- encodings and microprograms shared by the microcoded
// traffic-light controllers.
//
// Light encoding: every traffic light is a 3-bit {green, yellow, red} field,
// exactly one bit set.  Three controller styles share these lights:
//
//   * ucode_tlc  (flat ROM FSM)    word = {next_state, ns_light, ew_light}
//                addressed by {state, car_ew}.  Two programs: the basic
//                four-state controller and the improved eight-state one
//                (minimum north-south green, all-red between phases).
//   * ucode_is   (uPC + branches)  word = {br_inst[2:0], target[3:0],
//                ns_light, lt_light, ew_light}, one word per state.  Two
//                programs: the left-turn controller and its shorter
//                alternate that uses the branch-if-no-input instruction.
//   * ucode_mi   (brx / ldx)       word = {opcode, inst[2:0], value[4:0]};
//                opcode 1 = branch on condition inst to value, opcode 0 =
//                load register inst with value.  One program.
//
// The word layouts, the state numbering of the improved flat controller, the
// branch encodings and every program below follow the lecture tables.  This
// package's own choices: the basic flat controller numbers its states in
// binary order (gns=0, yns=1, gew=2, yew=3) like the lecture's simulated ROM
// image; unused ROM words jump back to address 0 with all lights red; the
// unconditional `br` of the brx/ldx program is encoded as "branch if timer
// done" (the printed condition decode has no always-true code, and at both
// places `br` is used the timer has just run out, so the branch is always
// taken); the timer constants T_GREEN, T_YELLOW and T_RED are not given
// numerically and are set here to 8, 3 and 1 clock cycles.
package ucode_pkg;

  // ------------------------------------------------------------------ lights
  typedef logic [2:0] light_t;                 // {green, yellow, red}
  localparam light_t GRN = 3'b100;
  localparam light_t YEL = 3'b010;
  localparam light_t RED = 3'b001;

  // ------------------------------------------------- flat ROM FSM, basic TLC
  localparam int TLC_N = 1;                    // inputs: car_ew
  localparam int TLC_M = 6;                    // outputs: ns, ew lights
  localparam int TLC_K = 2;                    // state bits

  typedef enum logic [1:0] {GNS = 2'd0, YNS = 2'd1, GEW = 2'd2, YEW = 2'd3} tlc_state_e;

  // Address {state, car_ew}; data {next, ns, ew}.
  localparam logic [TLC_K+TLC_M-1:0] TLC_BASIC_CODE [2**(TLC_K+TLC_N)] = '{
    {GNS, GRN, RED},   // gns, no car : stay green north-south
    {YNS, GRN, RED},   // gns, car_ew : to yellow
    {GEW, YEL, RED},   // yns
    {GEW, YEL, RED},
    {YEW, RED, GRN},   // gew
    {YEW, RED, GRN},
    {GNS, RED, YEL},   // yew
    {GNS, RED, YEL}
  };

  // ---------------------------------------------- flat ROM FSM, improved TLC
  localparam int TLC2_K = 3;

  typedef enum logic [2:0] {
    GNS1 = 3'd0, GNS2 = 3'd1, GNS3 = 3'd2, YNS2 = 3'd3,
    RNS2 = 3'd4, GEW2 = 3'd5, YEW2 = 3'd6, REW2 = 3'd7
  } tlc2_state_e;

  localparam logic [TLC2_K+TLC_M-1:0] TLC_IMPROVED_CODE [2**(TLC2_K+TLC_N)] = '{
    {GNS2, GRN, RED},  // GNS1
    {GNS2, GRN, RED},
    {GNS3, GRN, RED},  // GNS2
    {GNS3, GRN, RED},
    {GNS3, GRN, RED},  // GNS3, no car : hold
    {YNS2, GRN, RED},  // GNS3, car_ew
    {RNS2, YEL, RED},  // YNS
    {RNS2, YEL, RED},
    {GEW2, RED, RED},  // RNS : all red for one cycle
    {GEW2, RED, RED},
    {YEW2, RED, GRN},  // GEW, no car : leave
    {GEW2, RED, GRN},  // GEW, car_ew : hold
    {REW2, RED, YEL},  // YEW
    {REW2, RED, YEL},
    {GNS1, RED, RED},  // REW : all red for one cycle
    {GNS1, RED, RED}
  };

  // ------------------------------------------- sequenced microcode (ucode_is)
  localparam int IS_N = 2;                     // in[0] = left turn, in[1] = car_ew
  localparam int IS_M = 9;                     // {ns, lt, ew}
  localparam int IS_K = 4;                     // uPC bits
  localparam int IS_J = 3;                     // branch instruction bits

  // Bit 0 selects the left-turn input, bit 1 the east-west input, bit 2
  // inverts the result.
  typedef enum logic [2:0] {
    BR_NOP  = 3'b000,   // never branch
    BR_LT   = 3'b001,   // brlt
    BR_EW   = 3'b010,   // brew
    BR_ANY  = 3'b011,   // left turn or east-west
    BR_AL   = 3'b100,   // br, always
    BR_NLT  = 3'b101,   // brnlt
    BR_NEW  = 3'b110,   // brnew
    BR_NA   = 3'b111    // bna, neither input
  } is_br_e;

  typedef logic [IS_J+IS_K+IS_M-1:0] is_word_t;

  function automatic is_word_t is_op(is_br_e br, logic [IS_K-1:0] target,
                                     light_t ns, light_t lt, light_t ew);
    return {br, target, ns, lt, ew};
  endfunction

  localparam is_word_t IS_FILL = {BR_AL, 4'd0, RED, RED, RED};

  localparam is_word_t IS_LEFT_TURN_CODE [2**IS_K] = '{
    is_op(BR_LT,  4'd5, GRN, RED, RED),   // 0 NS1
    is_op(BR_NEW, 4'd0, GRN, RED, RED),   // 1 NS2
    is_op(BR_NOP, 4'd0, YEL, RED, RED),   // 2 EW1
    is_op(BR_EW,  4'd3, RED, RED, GRN),   // 3 EW2
    is_op(BR_AL,  4'd0, RED, RED, YEL),   // 4 EW3
    is_op(BR_NOP, 4'd0, YEL, RED, RED),   // 5 LT1
    is_op(BR_LT,  4'd6, RED, GRN, RED),   // 6 LT2
    is_op(BR_AL,  4'd0, RED, YEL, RED),   // 7 LT3
    IS_FILL, IS_FILL, IS_FILL, IS_FILL, IS_FILL, IS_FILL, IS_FILL, IS_FILL
  };

  localparam is_word_t IS_ALTERNATE_CODE [2**IS_K] = '{
    is_op(BR_NA,  4'd0, GRN, RED, RED),   // 0 NS1
    is_op(BR_LT,  4'd4, YEL, RED, RED),   // 1 NS2
    is_op(BR_EW,  4'd2, RED, RED, GRN),   // 2 EW1
    is_op(BR_AL,  4'd0, RED, RED, YEL),   // 3 EW2
    is_op(BR_LT,  4'd4, RED, GRN, RED),   // 4 LT1
    is_op(BR_AL,  4'd0, RED, YEL, RED),   // 5 LT2
    IS_FILL, IS_FILL, IS_FILL, IS_FILL, IS_FILL, IS_FILL, IS_FILL, IS_FILL,
    IS_FILL, IS_FILL
  };

  // ------------------------------------------ two instruction types (ucode_mi)
  localparam int MI_N = 2;                     // in[0] = left turn, in[1] = car_ew
  localparam int MI_M = 9;                     // {lt, ew, ns}
  localparam int MI_O = 3;                     // width of one light register
  localparam int MI_K = 5;                     // uPC / value bits
  localparam int MI_J = 4;                     // opcode + inst bits

  // ldx destinations: the register enabled is 1 << dest.
  typedef enum logic [2:0] {
    D_NS = 3'd0, D_EW = 3'd1, D_LT = 3'd2, D_TIM = 3'd3
  } mi_dest_e;

  // brx conditions: bits [1:0] select, bit 2 inverts.
  typedef enum logic [2:0] {
    C_LT  = 3'd0,   // blt   left-turn car
    C_EW  = 3'd1,   // bew   east-west car
    C_LE  = 3'd2,   // ble   either
    C_TD  = 3'd3,   // btd   timer done
    C_NLT = 3'd4,
    C_NEW = 3'd5,
    C_NLE = 3'd6,   // brnle neither car
    C_NTD = 3'd7    // bntz  timer not yet zero
  } mi_cond_e;

  localparam mi_cond_e C_BR = C_TD;            // `br`, see header

  typedef logic [MI_J+MI_K-1:0] mi_word_t;

  localparam logic [MI_K-1:0] T_GREEN  = 5'd8;
  localparam logic [MI_K-1:0] T_YELLOW = 5'd3;
  localparam logic [MI_K-1:0] T_RED    = 5'd1;

  function automatic mi_word_t mi_ld(mi_dest_e dest, logic [MI_K-1:0] value);
    return {1'b0, dest, value};
  endfunction

  function automatic mi_word_t mi_br(mi_cond_e cond, logic [MI_K-1:0] target);
    return {1'b1, cond, target};
  endfunction

  function automatic logic [MI_K-1:0] lamp(light_t l);
    return {{(MI_K-3){1'b0}}, l};
  endfunction

  // Program labels.
  localparam logic [MI_K-1:0] A_NS1 = 5'd2,  A_NS4 = 5'd4,  A_NS5 = 5'd5,  A_NS8 = 5'd8;
  localparam logic [MI_K-1:0] A_EW2 = 5'd12, A_EW5 = 5'd15, A_EW8 = 5'd18;
  localparam logic [MI_K-1:0] A_LT1 = 5'd21, A_LT2 = 5'd22, A_LT5 = 5'd25, A_LT8 = 5'd28;

  localparam mi_word_t MI_CODE [2**MI_K] = '{
    mi_ld(D_LT,  lamp(RED)),      //  0 rst1
    mi_ld(D_EW,  lamp(RED)),      //  1 rst2
    mi_ld(D_NS,  lamp(GRN)),      //  2 ns1
    mi_ld(D_TIM, T_GREEN),        //  3 ns3
    mi_br(C_NTD, A_NS4),          //  4 ns4  wait for timer
    mi_br(C_NLE, A_NS5),          //  5 ns5  wait for a car
    mi_ld(D_NS,  lamp(YEL)),      //  6 ns6
    mi_ld(D_TIM, T_YELLOW),       //  7 ns7
    mi_br(C_NTD, A_NS8),          //  8 ns8
    mi_ld(D_NS,  lamp(RED)),      //  9 ns9
    mi_br(C_LT,  A_LT1),          // 10 ns10 left turn or east-west?
    mi_ld(D_TIM, T_RED),          // 11 ew1
    mi_br(C_NTD, A_EW2),          // 12 ew2
    mi_ld(D_EW,  lamp(GRN)),      // 13 ew3
    mi_ld(D_TIM, T_GREEN),        // 14 ew4
    mi_br(C_NTD, A_EW5),          // 15 ew5
    mi_ld(D_EW,  lamp(YEL)),      // 16 ew6
    mi_ld(D_TIM, T_YELLOW),       // 17 ew7
    mi_br(C_NTD, A_EW8),          // 18 ew8
    mi_ld(D_EW,  lamp(RED)),      // 19 ew9
    mi_br(C_BR,  A_NS1),          // 20 ew10
    mi_ld(D_TIM, T_RED),          // 21 lt1
    mi_br(C_NTD, A_LT2),          // 22 lt2
    mi_ld(D_LT,  lamp(GRN)),      // 23 lt3
    mi_ld(D_TIM, T_GREEN),        // 24 lt4
    mi_br(C_NTD, A_LT5),          // 25 lt5
    mi_ld(D_LT,  lamp(YEL)),      // 26 lt6
    mi_ld(D_TIM, T_YELLOW),       // 27 lt7
    mi_br(C_NTD, A_LT8),          // 28 lt8
    mi_ld(D_LT,  lamp(RED)),      // 29 lt9
    mi_br(C_BR,  A_NS1),          // 30 lt10
    mi_br(C_BR,  5'd0)            // 31 unused
  };

endpackage
