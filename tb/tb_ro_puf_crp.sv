// Challenge-response workload: all 256 challenges applied repeatedly to two
// chips (two variation seeds), through the pins of the peripheral, with
// 10-bit counters and two response bits per chip.
//
// Reports and checks:
//   reliability  every bit that the delay-based model can decide gives the
//                same value in every repetition, and the model's value;
//   uniqueness   the two chips disagree on between 25 % and 75 % of the bits
//                of their first pass (an ideal PUF gives 50 %).
// Undecidable bits (RO pairs too close for 10-bit counters) are counted as
// unstable candidates and reported, not checked.
module tb_ro_puf_crp;
  import tb_puf_ref_pkg::*;
  timeunit 1ns;
  timeprecision 1fs;

  localparam int unsigned W    = 10;
  localparam int unsigned NB   = 2;
  localparam int unsigned REPS = 3;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0, tig = 1'b0, en = 1'b0;
  logic [7:0] chal = '0;
  logic [NB-1:0] r0, r1;

  always #5ns clk = ~clk;

  ro_puf_axi #(.RESP_BITS(NB), .CNT_WIDTH(W), .SEED(11)) u_chip0 (
    .tigSignal(tig), .enable(en), .challenges(chal), .response(r0),
    .s00_axi_aclk(clk), .s00_axi_aresetn(rst_n),
    .s00_axi_awaddr(4'h0), .s00_axi_awprot(3'b000), .s00_axi_awvalid(1'b0), .s00_axi_awready(),
    .s00_axi_wdata(32'h0), .s00_axi_wstrb(4'h0), .s00_axi_wvalid(1'b0), .s00_axi_wready(),
    .s00_axi_bresp(), .s00_axi_bvalid(), .s00_axi_bready(1'b1),
    .s00_axi_araddr(4'h0), .s00_axi_arprot(3'b000), .s00_axi_arvalid(1'b0), .s00_axi_arready(),
    .s00_axi_rdata(), .s00_axi_rresp(), .s00_axi_rvalid(), .s00_axi_rready(1'b1));

  ro_puf_axi #(.RESP_BITS(NB), .CNT_WIDTH(W), .SEED(12)) u_chip1 (
    .tigSignal(tig), .enable(en), .challenges(chal), .response(r1),
    .s00_axi_aclk(clk), .s00_axi_aresetn(rst_n),
    .s00_axi_awaddr(4'h0), .s00_axi_awprot(3'b000), .s00_axi_awvalid(1'b0), .s00_axi_awready(),
    .s00_axi_wdata(32'h0), .s00_axi_wstrb(4'h0), .s00_axi_wvalid(1'b0), .s00_axi_wready(),
    .s00_axi_bresp(), .s00_axi_bvalid(), .s00_axi_bready(1'b1),
    .s00_axi_araddr(4'h0), .s00_axi_arprot(3'b000), .s00_axi_arvalid(1'b0), .s00_axi_arready(),
    .s00_axi_rdata(), .s00_axi_rresp(), .s00_axi_rvalid(), .s00_axi_rready(1'b1));

  // Longest measurement: 2**W periods of a slow RO, plus margin, in cycles.
  localparam int unsigned WAIT_CYCLES = (2 ** W) * 4 / 10 + 60;

  initial begin
    #20ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NB-1:0] first0 [256], first1 [256];
    int differ = 0, unstable = 0, decided = 0, stable = 0;
    bit e;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    en    = 1'b1;
    for (int rep = 0; rep < REPS; rep++) begin
      for (int c = 0; c < 256; c++) begin
        chal = 8'(c);
        tig  = 1'b1;
        @(negedge clk);
        tig  = 1'b0;
        repeat (WAIT_CYCLES) @(negedge clk);
        for (int g = 0; g < NB; g++) begin
          if (predict(11, 16, g, c % 16, c / 16, W, e)) begin
            checks++;
            decided++;
            if (r0[g] != e) begin
              failures++;
              $display("FAIL rep %0d challenge %0d bit %0d = %b expected %b", rep, c, g, r0[g], e);
            end else stable++;
          end else if (rep > 0 && r0[g] != first0[c][g]) unstable++;
        end
        if (rep == 0) begin
          first0[c] = r0;
          first1[c] = r1;
          for (int g = 0; g < NB; g++) if (r0[g] != r1[g]) differ++;
        end
      end
    end
    $display("reliability: %0d of %0d decidable bit measurements as predicted", stable, decided);
    $display("undecidable bits that changed between repetitions: %0d", unstable);
    $display("uniqueness: chips differ on %0d of %0d bits", differ, 256 * NB);
    checks++;
    if (differ < 256 * NB / 4 || differ > 256 * NB * 3 / 4) begin
      failures++;
      $display("FAIL uniqueness out of range");
    end
    checks++;
    if (decided < 256 * NB * REPS / 2) begin
      failures++;
      $display("FAIL too few decidable bits (%0d)", decided);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
