// N:1 multiplexer that picks one ring oscillator output as a counter clock.
//
// The PUF has two of these per response bit, each 16:1, built on an FPGA
// from four 4:1 LUT muxes followed by two levels of 2:1 muxes. The select
// comes from half of the challenge and is held constant by the controller
// while a measurement runs, so the selected clock does not glitch while it
// is counted. Purely combinational.
module ro_mux #(
  parameter int unsigned N  = 16,
  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  ro_in,
  input  logic [SW-1:0] sel,
  output logic          ro_out
);
  timeunit 1ns;
  timeprecision 1fs;

  always_comb ro_out = ro_in[sel];
endmodule
