// Ring oscillator: behavioural model (not synthesizable).
//
// The circuit it stands for is an enable NAND followed by two inverters, the
// second inverter's output fed back to the NAND, and a third inverter as the
// output buffer. On an FPGA each gate is one LUT that must be kept from being
// optimised away and the loop must be allowed as a combinational loop; it is
// written here as a model because a zero-delay loop has no defined behaviour
// in simulation and the loop's real frequency is what the PUF measures.
//
// Interface: enable (active high) and fr_out, the oscillator output.
// Timing: with enable low the loop rests with fr_out low. After enable rises
// the first rising edge of fr_out comes after all four stage delays, and from
// then on fr_out toggles every loop delay (stages 0..2), so the period is twice
// the loop delay, about 3 ns (333 MHz) with the default 500 ps per stage. The
// stage delays come from ro_puf_pkg::stage_delay_fs(SEED, RO_ID, stage): SEED
// stands for the chip, RO_ID for the RO's place on it. When enable falls the
// output returns low after the output delay.
module ro_cell
  import ro_puf_pkg::*;
#(
  parameter int unsigned SEED  = 1,
  parameter int unsigned RO_ID = 0
) (
  input  logic enable,
  output logic fr_out
);
  timeunit 1ns;
  timeprecision 1fs;

  localparam realtime HALF_PERIOD = real'(loop_delay_fs(SEED, RO_ID)) / 1.0e6;
  localparam realtime OUT_DELAY   = real'(stage_delay_fs(SEED, RO_ID, LOOP_STAGES)) / 1.0e6;

  initial fr_out = 1'b0;

  always begin
    if (!enable) begin
      #(OUT_DELAY) fr_out = 1'b0;
      wait (enable);
      #(HALF_PERIOD + OUT_DELAY) fr_out = 1'b1;
    end else begin
      #(HALF_PERIOD);
      if (enable) fr_out = ~fr_out;
    end
  end
endmodule
