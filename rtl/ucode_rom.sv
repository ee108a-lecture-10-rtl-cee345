// ucode_rom -- microcode store.
//
// A read-only memory of 2**AW words of DW bits that holds a microprogram.
// The read is asynchronous: `data` follows `addr` within the same cycle, so
// the controllers that use it see the microinstruction of the current state
// (or uPC) in the cycle that state is held, and register what they need at
// the next clock edge.  The contents come from the CODE parameter, one word
// per address; the default is the basic flat traffic-light program.
//
// The lecture treats the memory only as a ROM (or RAM) component with an
// address input and a data output; the asynchronous read is taken from its
// simulated waveforms, where the data changes with the address.
module ucode_rom #(
  parameter int AW = ucode_pkg::TLC_K + ucode_pkg::TLC_N,
  parameter int DW = ucode_pkg::TLC_K + ucode_pkg::TLC_M,
  parameter logic [DW-1:0] CODE [2**AW] = ucode_pkg::TLC_BASIC_CODE
) (
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] data
);

  assign data = CODE[addr];

endmodule
