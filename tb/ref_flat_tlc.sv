// ref_flat_tlc -- cycle reference model of the flat (ROM) traffic-light
// controllers, written from their state diagrams rather than from ROM words.
//
// IMPROVED = 0: gns (holds while no east-west car) -> yns -> gew -> yew.
// IMPROVED = 1: GNS1 -> GNS2 -> GNS3 (holds while no car) -> YNS -> RNS ->
//               GEW (holds while a car) -> YEW -> REW -> GNS1.
// Like the controller, the state resets synchronously to the first state and
// the lights are the registered lights of the previous state.  `valid` rises
// once two reset edges have made the controller's registers known.
module ref_flat_tlc #(
  parameter bit IMPROVED = 0
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       car_ew,
  output logic [2:0] exp_state,
  output logic [5:0] exp_lights,
  output logic       valid
);
  localparam logic [2:0] G = 3'b100, Y = 3'b010, R = 3'b001;

  typedef enum int {S_GNS1, S_GNS2, S_GNS3, S_YNS, S_RNS, S_GEW, S_YEW, S_REW} st_e;
  st_e st = S_GNS1;
  int  rst_edges = 0;

  function automatic logic [5:0] lights(st_e s);
    case (s)
      S_GNS1, S_GNS2, S_GNS3: return {G, R};
      S_YNS:                  return {Y, R};
      S_GEW:                  return {R, G};
      S_YEW:                  return {R, Y};
      default:                return {R, R};
    endcase
  endfunction

  function automatic st_e next(st_e s, logic car);
    if (!IMPROVED)
      case (s)
        S_GNS1:  return car ? S_YNS : S_GNS1;
        S_YNS:   return S_GEW;
        S_GEW:   return S_YEW;
        default: return S_GNS1;
      endcase
    else
      case (s)
        S_GNS1:  return S_GNS2;
        S_GNS2:  return S_GNS3;
        S_GNS3:  return car ? S_YNS : S_GNS3;
        S_YNS:   return S_RNS;
        S_RNS:   return S_GEW;
        S_GEW:   return car ? S_GEW : S_YEW;
        S_YEW:   return S_REW;
        default: return S_GNS1;
      endcase
  endfunction

  // state numbering used by the controller's ROM
  function automatic logic [2:0] code(st_e s);
    if (!IMPROVED)
      case (s)
        S_GNS1:  return 3'd0;
        S_YNS:   return 3'd1;
        S_GEW:   return 3'd2;
        default: return 3'd3;
      endcase
    else
      return 3'(int'(s));
  endfunction

  always @(posedge clk) begin
    exp_lights <= lights(st);
    st         <= rst ? S_GNS1 : next(st, car_ew);
    if (rst && rst_edges < 2) rst_edges <= rst_edges + 1;
  end

  assign exp_state = code(st);
  assign valid     = (rst_edges >= 2);
endmodule
