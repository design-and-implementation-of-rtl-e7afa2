// Magnitude comparator of the two RO counters: gt is 1 when count_a is
// greater than count_b. It is read only after both counters have stopped,
// so its inputs are static when its output is sampled. Combinational.
module count_compare #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] count_a,
  input  logic [WIDTH-1:0] count_b,
  output logic             gt
);
  timeunit 1ns;
  timeprecision 1fs;

  always_comb gt = (count_a > count_b);
endmodule
