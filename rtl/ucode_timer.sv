// ucode_timer -- down-counting timer used as a microcode-loadable register.
//
// `load` (the timer's enable from the output decoder) copies `value` into
// the count; otherwise a non-zero count decreases by one each clock.  `done`
// is high while the count is zero, so a program that loads N and then loops
// on "branch if not done" waits until N clocks after the load.  Synchronous
// reset clears the count (done high).  The lecture gives the timer's ports
// and role (load starts it, branches test whether it has finished); the
// count-down-to-zero behaviour is this design's own choice.
module ucode_timer #(
  parameter int W = ucode_pkg::MI_K
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic [W-1:0] value,
  output logic         done
);

  logic [W-1:0] count;

  always_ff @(posedge clk) begin
    if (rst)             count <= '0;
    else if (load)       count <= value;
    else if (count != 0) count <= count - 1'b1;
  end

  assign done = (count == '0);

endmodule
