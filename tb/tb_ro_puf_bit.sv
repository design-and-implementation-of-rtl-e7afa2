// Testbench of one PUF response bit with 10-bit counters. For many RO pairs
// it starts a measurement, compares the response with the prediction made
// from the oscillators' delays, checks that the faster counter ended full,
// and checks the measurement time against 2**CNT_WIDTH-1 periods of the
// faster RO. It also checks that a start while busy is ignored, that the
// result is reproducible and that nothing happens while the ROs are off.
module tb_ro_puf_bit;
  import ro_puf_pkg::*;
  import tb_puf_ref_pkg::*;
  timeunit 1ns;
  timeprecision 1fs;

  localparam int unsigned W    = 10;
  localparam int unsigned SEED = 3;
  localparam int unsigned GRP  = 2;
  int checks = 0, failures = 0, seen1 = 0, seen0 = 0;

  logic clk = 1'b0, rst_n = 1'b0, ro_en = 1'b0, start = 1'b0;
  logic [3:0] sel_a, sel_b;
  logic busy, valid, done, resp, full_a, full_b;
  logic [W-1:0] ca, cb;

  always #5ns clk = ~clk;

  ro_puf_bit #(.N_RO(16), .CNT_WIDTH(W), .SEED(SEED), .GROUP(GRP)) u_dut (
    .clk(clk), .rst_n(rst_n), .ro_enable(ro_en), .start(start), .sel_a(sel_a), .sel_b(sel_b),
    .busy(busy), .valid(valid), .done(done), .response(resp),
    .count_a(ca), .count_b(cb), .full_a(full_a), .full_b(full_b));

  task automatic measure(input int a, input int b, output bit r, output int cycles);
    @(negedge clk);
    sel_a = 4'(a);
    sel_b = 4'(b);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    sel_a = ~sel_a;  // must have been latched
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    r = resp;
  endtask

  initial begin
    #5ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit r, r2, e;
    int cyc, cyc2;
    real exp_ns;
    sel_a = '0;
    sel_b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    ro_en = 1'b1;
    repeat (2) @(negedge clk);
    for (int k = 0; k < 60; k++) begin
      int a, b;
      a = int'($urandom_range(15));
      b = (k % 10 == 0) ? a : int'($urandom_range(15));
      measure(a, b, r, cyc);
      checks++;
      if (!valid) begin failures++; $display("FAIL valid low after done"); end
      if (predict(SEED, 16, GRP, a, b, W, e)) begin
        checks++;
        if (r != e) begin
          failures++;
          $display("FAIL pair %0d,%0d response %b expected %b (counts %0d %0d)", a, b, r, e, ca, cb);
        end
        if (a != b) begin
          checks++;
          if ((e && !full_a) || (!e && !full_b)) begin
            failures++;
            $display("FAIL pair %0d,%0d faster counter not full", a, b);
          end
        end
        if (r) seen1++; else seen0++;
      end
      exp_ns = eval_ns(SEED, 16, GRP, a, b, W);
      checks++;
      if (real'(cyc) * 10.0 < exp_ns || real'(cyc) * 10.0 > exp_ns + 200.0) begin
        failures++;
        $display("FAIL pair %0d,%0d took %0d cycles, expected about %f ns", a, b, cyc, exp_ns);
      end
    end
    // Reproducibility of one pair.
    measure(1, 9, r, cyc);
    measure(1, 9, r2, cyc2);
    checks++;
    if (r != r2) begin failures++; $display("FAIL not reproducible"); end
    // Start while busy is ignored.
    @(negedge clk);
    sel_a = 4'd4; sel_b = 4'd5; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (5) @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    repeat (2) @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL start while busy was taken"); end
    // ROs off: the measurement waits, then completes once they run.
    ro_en = 1'b0;
    @(negedge clk);
    sel_a = 4'd2; sel_b = 4'd3; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (200) @(negedge clk);
    checks++;
    if (!busy || ca != 0 || cb != 0) begin failures++; $display("FAIL counted with ROs off"); end
    ro_en = 1'b1;
    while (!done) @(negedge clk);
    checks++;
    if (seen0 == 0 || seen1 == 0) begin failures++; $display("FAIL responses not both seen"); end
    $display("responses: %0d ones, %0d zeros", seen1, seen0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
