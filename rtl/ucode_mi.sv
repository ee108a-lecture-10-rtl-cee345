// ucode_mi -- microcoded controller with two instruction types.
//
// Every word is either a branch or a load, which keeps the word narrow
// (J + K bits, here 9) at the price of more words:
//   brx  {1, cond[2:0], target[K-1:0]}  branch to target when cond holds
//   ldx  {0, dest[2:0], value[K-1:0]}   write value into register dest
// A load never branches, so the uPC simply advances.  The load destinations
// are the three light registers (dest 0 = NS, 1 = EW, 2 = LT, each the low
// O bits of value) and the timer (dest 3), which counts the loaded value
// down and reports `done` at zero for the branch conditions.  Branch
// conditions: 0 left-turn car, 1 east-west car, 2 either, 3 timer done,
// +4 inverts.
//
// Timing: the ROM read is combinational from the uPC; register writes, the
// timer load and the uPC update all happen at the next clock edge, so a light
// changes one clock after the ldx that sets it is addressed.  Reset is
// synchronous; it sends the uPC to 0 and clears the timer.  Outputs:
// out = {LT, EW, NS}, each {g, y, r}.
//
// Structure, formats and program follow the lecture.  This design's choices:
// the light registers reset to red (the lecture leaves them unreset and has
// its program load them first), and the branch inversion applies to the
// selected condition as a whole.
module ucode_mi #(
  parameter int N = ucode_pkg::MI_N,
  parameter int M = ucode_pkg::MI_M,
  parameter int O = ucode_pkg::MI_O,
  parameter int K = ucode_pkg::MI_K,
  parameter int J = ucode_pkg::MI_J,
  parameter logic [J+K-1:0] CODE [2**K] = ucode_pkg::MI_CODE
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] in,
  output logic [M-1:0] out,
  output logic [K-1:0] upc,
  output logic         branch,
  output logic         done
);

  localparam int R = M / O;           // light registers; the timer is enable R

  logic [J+K-1:0] uinst;
  logic           opcode;
  logic [J-2:0]   inst;
  logic [K-1:0]   value;
  logic [R:0]     en;

  assign {opcode, inst, value} = uinst;

  ucode_rom #(.AW(K), .DW(J + K), .CODE(CODE)) u_rom (
    .addr (upc),
    .data (uinst)
  );

  mi_output_decode #(.E(R + 1)) u_decode (
    .opcode (opcode),
    .dest   (inst),
    .en     (en)
  );

  for (genvar r = 0; r < R; r++) begin : g_light
    always_ff @(posedge clk) begin
      if (rst)        out[r*O +: O] <= O'(1);        // red
      else if (en[r]) out[r*O +: O] <= value[O-1:0];
    end
  end

  ucode_timer #(.W(K)) u_timer (
    .clk   (clk),
    .rst   (rst),
    .load  (en[R]),
    .value (value),
    .done  (done)
  );

  mi_branch_logic u_branch (
    .opcode (opcode),
    .cond   (inst),
    .in     (in[1:0]),
    .done   (done),
    .branch (branch)
  );

  ucode_sequencer #(.K(K)) u_seq (
    .clk    (clk),
    .rst    (rst),
    .branch (branch),
    .target (value),
    .upc    (upc)
  );

  initial assert (J == 4 && N == 2 && M == R * O)
    else $error("ucode_mi: unsupported field widths");

endmodule
