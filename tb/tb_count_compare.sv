// Testbench of the counter comparator: random and edge values.
module tb_count_compare;
  timeunit 1ns;
  timeprecision 1fs;

  int checks = 0, failures = 0;
  logic [15:0] a, b;
  logic        gt;

  count_compare #(.WIDTH(16)) u_dut (.count_a(a), .count_b(b), .gt(gt));

  task automatic check(input logic [15:0] va, input logic [15:0] vb);
    a = va;
    b = vb;
    #1ns;
    checks++;
    if (gt != (int'(va) > int'(vb))) begin
      failures++;
      $display("FAIL a=%0d b=%0d gt=%b", va, vb, gt);
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'hFFFF, 16'hFFDD);
    check(16'hFFDD, 16'hFFFF);
    check(16'hFFFF, 16'hFFFF);
    check(16'h0000, 16'h0000);
    check(16'h8000, 16'h7FFF);
    check(16'h0001, 16'h0000);
    for (int i = 0; i < 500; i++) check(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
