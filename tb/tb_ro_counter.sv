// Testbench of the RO-clocked counter, driven by a plain test clock: counting
// starts two edges after run rises, stops two edges after it falls, stops at
// 2**WIDTH-1 with full set, and clr empties it.
module tb_ro_counter;
  timeunit 1ns;
  timeprecision 1fs;

  localparam int unsigned W = 6;
  int checks = 0, failures = 0;
  logic ro_clk = 1'b0, clr, run;
  logic [W-1:0] count;
  logic full;

  ro_counter #(.WIDTH(W)) u_dut (.ro_clk(ro_clk), .clr(clr), .run(run), .count(count), .full(full));

  task automatic edges(input int n);
    repeat (n) begin
      #1.5ns ro_clk = 1'b1;
      #1.5ns ro_clk = 1'b0;
    end
  endtask

  task automatic expect_state(input int exp_c, input bit exp_f, input string what);
    checks++;
    if (int'(count) != exp_c || full != exp_f) begin
      failures++;
      $display("FAIL %s: count=%0d full=%b expected %0d %b", what, count, full, exp_c, exp_f);
    end
  endtask

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1'b1;
    run = 1'b0;
    edges(3);
    expect_state(0, 0, "in clear");
    clr = 1'b0;
    edges(5);
    expect_state(0, 0, "run low");
    run = 1'b1;
    edges(2);
    expect_state(0, 0, "synchroniser latency");
    edges(10);
    expect_state(10, 0, "ten edges");
    run = 1'b0;
    edges(2);
    expect_state(12, 0, "two edges after run falls");
    edges(5);
    expect_state(12, 0, "stopped");
    run = 1'b1;
    edges(2 + (2**W - 1 - 12) - 1);
    expect_state(2**W - 2, 0, "one before last");
    edges(1);
    expect_state(2**W - 1, 1, "last value");
    edges(10);
    expect_state(2**W - 1, 1, "held at last value");
    #1ns clr = 1'b1;
    #1ns;
    expect_state(0, 0, "asynchronous clear");
    clr = 1'b0;
    run = 1'b1;
    edges(2 + 7);
    expect_state(7, 0, "counting after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
