// Testbench of the RO select mux: every select value with random inputs.
module tb_ro_mux;
  timeunit 1ns;
  timeprecision 1fs;

  int checks = 0, failures = 0;
  logic [15:0] d;
  logic [3:0]  sel;
  logic        y;

  ro_mux #(.N(16)) u_dut (.ro_in(d), .sel(sel), .ro_out(y));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 64; r++) begin
      d = 16'($urandom);
      for (int s = 0; s < 16; s++) begin
        sel = 4'(s);
        #1ns;
        checks++;
        if (y != d[s]) begin
          failures++;
          $display("FAIL d=%h sel=%0d y=%b", d, s, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
