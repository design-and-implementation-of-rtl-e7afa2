// Testbench of the ring oscillator model: output stays low while disabled,
// and once enabled toggles with a period of twice the loop delay, which is
// worked out here from the stage delays of the variation model.
module tb_ro_cell;
  import ro_puf_pkg::*;
  timeunit 1ns;
  timeprecision 1fs;

  localparam int unsigned SEED = 7;
  int checks = 0, failures = 0;

  logic en;
  logic [3:0] fo;
  realtime last_rise [4];
  int rises [4];

  for (genvar i = 0; i < 4; i++) begin : g
    ro_cell #(.SEED(SEED), .RO_ID(i)) u_dut (.enable(en), .fr_out(fo[i]));
    always @(posedge fo[i]) begin
      realtime now, exp_p;
      now   = $realtime;
      exp_p = 2.0 * real'(loop_delay_fs(SEED, i)) / 1.0e6;
      if (rises[i] > 0) begin
        checks++;
        if (now - last_rise[i] < exp_p - 0.001 || now - last_rise[i] > exp_p + 0.001) begin
          failures++;
          $display("FAIL ro %0d period %f expected %f", i, now - last_rise[i], exp_p);
        end
      end
      rises[i]++;
      last_rise[i] = now;
    end
  end

  initial begin
    #100us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) rises[i] = 0;
    en = 1'b0;
    #20ns;
    checks++;
    if (fo != 4'b0) begin failures++; $display("FAIL output not low while disabled"); end
    en = 1'b1;
    #300ns;
    en = 1'b0;
    #20ns;
    checks++;
    if (fo != 4'b0) begin failures++; $display("FAIL output not low after disable"); end
    for (int i = 0; i < 4; i++) begin
      int exp_n;
      exp_n = int'(300.0 / (2.0 * real'(loop_delay_fs(SEED, i)) / 1.0e6));
      checks++;
      if (rises[i] < exp_n - 1 || rises[i] > exp_n + 1) begin
        failures++;
        $display("FAIL ro %0d rises %0d expected about %0d", i, rises[i], exp_n);
      end
      rises[i] = 0;
    end
    #200ns;
    checks++;
    if (rises[0] != 0) begin failures++; $display("FAIL toggles while disabled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
