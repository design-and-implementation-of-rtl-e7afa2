// Testbench of the PUF core with eight response bits and 10-bit counters:
// random challenges, each response bit compared with the prediction made
// from its group's oscillator delays, busy/valid sequencing, and the
// measurement time of the slowest group.
module tb_ro_puf_core;
  import ro_puf_pkg::*;
  import tb_puf_ref_pkg::*;
  timeunit 1ns;
  timeprecision 1fs;

  localparam int unsigned W    = 10;
  localparam int unsigned SEED = 5;
  localparam int unsigned NB   = 8;
  int checks = 0, failures = 0, decided = 0;

  logic clk = 1'b0, rst_n = 1'b0, ro_en = 1'b0, start = 1'b0;
  logic [7:0] chal;
  logic busy, valid;
  logic [NB-1:0] resp;

  always #5ns clk = ~clk;

  ro_puf_core #(.RESP_BITS(NB), .N_RO(16), .CNT_WIDTH(W), .SEED(SEED)) u_dut (
    .clk(clk), .rst_n(rst_n), .ro_enable(ro_en), .start(start), .challenge(chal),
    .busy(busy), .valid(valid), .response(resp));

  initial begin
    #5ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    real slowest, t;
    bit e;
    chal = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    ro_en = 1'b1;
    checks++;
    if (busy || valid) begin failures++; $display("FAIL busy/valid after reset"); end
    for (int k = 0; k < 24; k++) begin
      chal = 8'($urandom);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      checks++;
      if (!busy || valid) begin failures++; $display("FAIL busy/valid after start"); end
      cyc = 1;
      while (!valid) begin
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (busy) begin failures++; $display("FAIL busy with valid"); end
      slowest = 0.0;
      for (int g = 0; g < NB; g++) begin
        t = eval_ns(SEED, 16, g, chal[3:0], chal[7:4], W);
        if (t > slowest) slowest = t;
        if (predict(SEED, 16, g, chal[3:0], chal[7:4], W, e)) begin
          decided++;
          checks++;
          if (resp[g] != e) begin
            failures++;
            $display("FAIL challenge %0d bit %0d = %b expected %b", chal, g, resp[g], e);
          end
        end
      end
      checks++;
      if (real'(cyc) * 10.0 < slowest || real'(cyc) * 10.0 > slowest + 200.0) begin
        failures++;
        $display("FAIL challenge %0d took %0d cycles, expected about %f ns", chal, cyc, slowest);
      end
      @(negedge clk);
    end
    $display("%0d response bits predicted", decided);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
