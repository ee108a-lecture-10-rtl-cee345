// ref_seq_tlc -- cycle reference model of the sequenced (uPC + branch)
// left-turn traffic-light controllers, written from their state descriptions.
// in[0] is the left-turn car, in[1] the east-west car; lights are
// {ns, lt, ew}, each {g, y, r}, registered one clock behind the state.
//
// ALT = 0 (eight words): NS1 -> LT1 on a left-turn car, else NS2; NS2 back to
//   NS1 without an east-west car, else EW1; EW1 (yellow ns) -> EW2 (green ew,
//   holds while the car stays) -> EW3 (yellow ew) -> NS1; LT1 (yellow ns) ->
//   LT2 (green lt, holds while the car stays) -> LT3 (yellow lt) -> NS1.
// ALT = 1 (six words): NS1 holds until any car; NS2 (yellow ns) -> LT1 on a
//   left-turn car, else EW1; EW1 holds while an east-west car; EW2 (yellow
//   ew) -> NS1; LT1 holds while a left-turn car; LT2 (yellow lt) -> NS1.
module ref_seq_tlc #(
  parameter bit ALT = 0
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] in,
  output logic [3:0] exp_upc,
  output logic [8:0] exp_lights,
  output logic       valid
);
  localparam logic [2:0] G = 3'b100, Y = 3'b010, R = 3'b001;

  typedef enum int {NS1, NS2, EW1, EW2, EW3, LT1, LT2, LT3} st_e;
  st_e st = NS1;
  int  rst_edges = 0;

  function automatic logic [8:0] lights(st_e s);
    if (!ALT)
      case (s)
        NS1, NS2: return {G, R, R};
        EW1, LT1: return {Y, R, R};
        EW2:      return {R, R, G};
        EW3:      return {R, R, Y};
        LT2:      return {R, G, R};
        default:  return {R, Y, R};
      endcase
    else
      case (s)
        NS1:      return {G, R, R};
        NS2:      return {Y, R, R};
        EW1:      return {R, R, G};
        EW2:      return {R, R, Y};
        LT1:      return {R, G, R};
        default:  return {R, Y, R};
      endcase
  endfunction

  function automatic st_e next(st_e s, logic lt, logic ew);
    if (!ALT)
      case (s)
        NS1:     return lt ? LT1 : NS2;
        NS2:     return ew ? EW1 : NS1;
        EW1:     return EW2;
        EW2:     return ew ? EW2 : EW3;
        LT1:     return LT2;
        LT2:     return lt ? LT2 : LT3;
        default: return NS1;
      endcase
    else
      case (s)
        NS1:     return (lt || ew) ? NS2 : NS1;
        NS2:     return lt ? LT1 : EW1;
        EW1:     return ew ? EW1 : EW2;
        LT1:     return lt ? LT1 : LT2;
        default: return NS1;
      endcase
  endfunction

  function automatic logic [3:0] addr(st_e s);
    if (!ALT)
      case (s)
        NS1: return 4'd0;  NS2: return 4'd1;  EW1: return 4'd2;  EW2: return 4'd3;
        EW3: return 4'd4;  LT1: return 4'd5;  LT2: return 4'd6;  default: return 4'd7;
      endcase
    else
      case (s)
        NS1: return 4'd0;  NS2: return 4'd1;  EW1: return 4'd2;  EW2: return 4'd3;
        LT1: return 4'd4;  default: return 4'd5;
      endcase
  endfunction

  always @(posedge clk) begin
    exp_lights <= lights(st);
    st         <= rst ? NS1 : next(st, in[0], in[1]);
    if (rst && rst_edges < 2) rst_edges <= rst_edges + 1;
  end

  assign exp_upc = addr(st);
  assign valid   = (rst_edges >= 2);
endmodule
