// Counter clocked by a ring oscillator.
//
// Counts rising edges of ro_clk, the RO chosen by a mux, while run is high,
// and stops at its final value 2**WIDTH-1. full goes high on the edge that
// reaches that value and stays high until clr. run comes from other clock
// domains (the system clock and the other counter's full flag), so it passes
// through a two-stage synchroniser clocked by ro_clk: counting starts and
// stops two RO edges after run changes. clr is an asynchronous, active-high
// clear from the controller. Counting in the RO's own clock ("gated clock")
// follows the architecture; the synchroniser and the full flag register are
// this design's choices.
module ro_counter #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             ro_clk,
  input  logic             clr,
  input  logic             run,
  output logic [WIDTH-1:0] count,
  output logic             full
);
  timeunit 1ns;
  timeprecision 1fs;

  localparam logic [WIDTH-1:0] LAST = '1;

  logic [1:0] run_sync;

  always_ff @(posedge ro_clk or posedge clr) begin
    if (clr) run_sync <= '0;
    else     run_sync <= {run_sync[0], run};
  end

  always_ff @(posedge ro_clk or posedge clr) begin
    if (clr) begin
      count <= '0;
      full  <= 1'b0;
    end else if (run_sync[1] && !full) begin
      count <= count + 1'b1;
      full  <= (count == LAST - 1'b1);
    end
  end
endmodule
