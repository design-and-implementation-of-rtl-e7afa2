// RO PUF core: RESP_BITS independent RO groups that answer one challenge.
//
// The challenge is split into two halves: the low half selects RO A and the
// high half RO B of every group, so an 8-bit challenge picks one of the
// 16 x 16 = 256 ordered RO pairs. Every group holds its own N_RO oscillators
// and produces one bit of the response; all groups start together on start.
// valid rises when every group has finished and stays high until the next
// start; busy is high while any group is measuring.
// Timing: one measurement takes about 2**CNT_WIDTH periods of the faster RO
// of the slowest group, plus a few system cycles.
// The 8-bit challenge, the two 16:1 muxes and more groups for more response
// bits follow the architecture; RESP_BITS = 8 is taken from the width of the
// IP's response port, and the split of the challenge into halves is this
// design's choice.
module ro_puf_core #(
  parameter int unsigned RESP_BITS = 8,
  parameter int unsigned N_RO      = 16,
  parameter int unsigned CNT_WIDTH = 16,
  parameter int unsigned SEED      = 1,
  localparam int unsigned SW = $clog2(N_RO)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ro_enable,
  input  logic                 start,
  input  logic [2*SW-1:0]      challenge,
  output logic                 busy,
  output logic                 valid,
  output logic [RESP_BITS-1:0] response
);
  timeunit 1ns;
  timeprecision 1fs;

  logic [RESP_BITS-1:0] bit_busy, bit_valid;

  for (genvar g = 0; g < RESP_BITS; g++) begin : g_bit
    ro_puf_bit #(
      .N_RO      (N_RO),
      .CNT_WIDTH (CNT_WIDTH),
      .SEED      (SEED),
      .GROUP     (g)
    ) u_bit (
      .clk       (clk),
      .rst_n     (rst_n),
      .ro_enable (ro_enable),
      .start     (start),
      .sel_a     (challenge[SW-1:0]),
      .sel_b     (challenge[2*SW-1:SW]),
      .busy      (bit_busy[g]),
      .valid     (bit_valid[g]),
      .done      (),
      .response  (response[g]),
      .count_a   (),
      .count_b   (),
      .full_a    (),
      .full_b    ()
    );
  end

  assign busy  = |bit_busy;
  assign valid = &bit_valid;
endmodule
