// End-to-end testbench of the RO PUF peripheral with 10-bit counters and
// two response bits (two RO groups) per chip.
//
// Two peripherals with different variation seeds stand for two chips. The
// first is driven over AXI4-Lite and by its pins, the second by the same pins
// only. The test applies all 256 challenges through the registers and checks
// every response bit that the delay-based reference model can decide, then
// exercises each way of controlling the block and counts how often each
// happened: start from the tigSignal pin and from the CTRL register,
// challenge from the pins and from the register, ROs enabled from the pin and
// from the register, a measurement stalled while the ROs are off, a start
// ignored while busy, byte strobes, AXI back-pressure on B and R, repeated
// challenges giving the same response, and the two chips answering a
// challenge differently. A mechanism that never happened counts as a failure.
module tb_ro_puf_axi;
  import ro_puf_pkg::*;
  import tb_puf_ref_pkg::*;
  timeunit 1ns;
  timeprecision 1fs;

  localparam int unsigned W     = 10;
  localparam int unsigned NB    = 2;   // response bits per chip, to keep the run short
  localparam int unsigned SEED0 = 1;
  localparam int unsigned SEED1 = 2;
  int checks = 0, failures = 0;

  typedef enum int {
    M_PIN_START, M_REG_START, M_PIN_CHAL, M_REG_CHAL, M_PIN_EN, M_REG_EN, M_STALL,
    M_BUSY_IGNORE, M_STRB, M_BACKPRESSURE, M_REPEAT, M_UNIQUE, M_RESP1, M_RESP0, M_COUNT
  } mech_e;
  int mech [M_COUNT];

  logic clk = 1'b0, rst_n = 1'b0;
  logic tig = 1'b0, en_pin = 1'b0;
  logic [7:0] chal_pin = '0;
  logic [NB-1:0] resp0, resp1;

  logic [3:0]  awaddr = '0, araddr = '0;
  logic        awvalid = 1'b0, wvalid = 1'b0, bready = 1'b0, arvalid = 1'b0, rready = 1'b0;
  logic [31:0] wdata = '0;
  logic [3:0]  wstrb = '0;
  logic        awready, wready, bvalid, arready, rvalid;
  logic [1:0]  bresp, rresp;
  logic [31:0] rdata;

  always #5ns clk = ~clk;

  ro_puf_axi #(.RESP_BITS(NB), .CNT_WIDTH(W), .SEED(SEED0)) u_dut0 (
    .tigSignal(tig), .enable(en_pin), .challenges(chal_pin), .response(resp0),
    .s00_axi_aclk(clk), .s00_axi_aresetn(rst_n),
    .s00_axi_awaddr(awaddr), .s00_axi_awprot(3'b000), .s00_axi_awvalid(awvalid), .s00_axi_awready(awready),
    .s00_axi_wdata(wdata), .s00_axi_wstrb(wstrb), .s00_axi_wvalid(wvalid), .s00_axi_wready(wready),
    .s00_axi_bresp(bresp), .s00_axi_bvalid(bvalid), .s00_axi_bready(bready),
    .s00_axi_araddr(araddr), .s00_axi_arprot(3'b000), .s00_axi_arvalid(arvalid), .s00_axi_arready(arready),
    .s00_axi_rdata(rdata), .s00_axi_rresp(rresp), .s00_axi_rvalid(rvalid), .s00_axi_rready(rready));

  ro_puf_axi #(.RESP_BITS(NB), .CNT_WIDTH(W), .SEED(SEED1)) u_dut1 (
    .tigSignal(tig), .enable(en_pin), .challenges(chal_pin), .response(resp1),
    .s00_axi_aclk(clk), .s00_axi_aresetn(rst_n),
    .s00_axi_awaddr(4'h0), .s00_axi_awprot(3'b000), .s00_axi_awvalid(1'b0), .s00_axi_awready(),
    .s00_axi_wdata(32'h0), .s00_axi_wstrb(4'h0), .s00_axi_wvalid(1'b0), .s00_axi_wready(),
    .s00_axi_bresp(), .s00_axi_bvalid(), .s00_axi_bready(1'b1),
    .s00_axi_araddr(4'h0), .s00_axi_arprot(3'b000), .s00_axi_arvalid(1'b0), .s00_axi_arready(),
    .s00_axi_rdata(), .s00_axi_rresp(), .s00_axi_rvalid(), .s00_axi_rready(1'b1));

  // ---------------- AXI4-Lite master ----------------
  task automatic axi_write(input logic [3:0] addr, input logic [31:0] data,
                           input logic [3:0] strb = 4'hF, input int b_delay = 0);
    @(negedge clk);
    awaddr = addr; awvalid = 1'b1; wdata = data; wstrb = strb; wvalid = 1'b1; bready = 1'b0;
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk);
    awvalid = 1'b0; wvalid = 1'b0;
    repeat (b_delay) begin
      @(negedge clk);
      checks++;
      if (!bvalid) begin failures++; $display("FAIL bvalid dropped under back-pressure"); end
    end
    if (b_delay > 0) mech[M_BACKPRESSURE]++;
    bready = 1'b1;
    do @(posedge clk); while (!bvalid);
    checks++;
    if (bresp != 2'b00) begin failures++; $display("FAIL bresp %b", bresp); end
    @(negedge clk);
    bready = 1'b0;
  endtask

  task automatic axi_read(input logic [3:0] addr, output logic [31:0] data, input int r_delay = 0);
    @(negedge clk);
    araddr = addr; arvalid = 1'b1; rready = 1'b0;
    do @(posedge clk); while (!arready);
    @(negedge clk);
    arvalid = 1'b0;
    repeat (r_delay) @(negedge clk);
    if (r_delay > 0) mech[M_BACKPRESSURE]++;
    rready = 1'b1;
    do @(posedge clk); while (!rvalid);
    data = rdata;
    checks++;
    if (rresp != 2'b00) begin failures++; $display("FAIL rresp %b", rresp); end
    @(negedge clk);
    rready = 1'b0;
  endtask

  task automatic wait_done(output int polls);
    logic [31:0] st;
    polls = 0;
    do begin
      axi_read(REG_STATUS, st);
      polls++;
    end while (!(st[1] && !st[0]) && polls < 100000);
  endtask

  // Checks every decidable bit of a response of one chip.
  task automatic check_response(input int unsigned seed, input logic [7:0] c,
                                input logic [NB-1:0] r, input string what);
    bit e;
    for (int g = 0; g < NB; g++) begin
      if (predict(seed, 16, g, c[3:0], c[7:4], W, e)) begin
        checks++;
        if (r[g] != e) begin
          failures++;
          $display("FAIL %s challenge %0d bit %0d = %b expected %b", what, c, g, r[g], e);
        end else if (e) mech[M_RESP1]++;
        else mech[M_RESP0]++;
      end
    end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    logic [NB-1:0] first [256];
    int polls;
    logic [NB-1:0] mask;
    bit e;
    for (int m = 0; m < M_COUNT; m++) mech[m] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Register map after reset.
    axi_read(REG_CTRL, d);
    checks++;
    if (d != 0) begin failures++; $display("FAIL CTRL after reset %h", d); end
    axi_read(REG_STATUS, d, 3);
    checks++;
    if (d != 0) begin failures++; $display("FAIL STATUS after reset %h", d); end

    // Challenge register with byte strobes: byte 1 written alone leaves byte 0.
    axi_write(REG_CHALLENGE, 32'h0000_00A5);
    axi_write(REG_CHALLENGE, 32'h0000_5A00, 4'b0010, 2);
    axi_read(REG_CHALLENGE, d);
    checks++;
    if (d != 32'h0000_5AA5) begin failures++; $display("FAIL strobes %h", d); end
    else mech[M_STRB]++;

    // All 256 challenges from the registers, ROs enabled by the register.
    axi_write(REG_CTRL, 32'h0000_0005);  // enable, use register challenge
    for (int c = 0; c < 256; c++) begin
      axi_write(REG_CHALLENGE, 32'(c));
      axi_write(REG_CTRL, 32'h0000_0007);  // start
      wait_done(polls);
      axi_read(REG_RESPONSE, d, (c % 64 == 0) ? 2 : 0);
      first[c] = d[NB-1:0];
      checks++;
      if (d[NB-1:0] != resp0) begin failures++; $display("FAIL RESPONSE register differs from pins"); end
      check_response(SEED0, 8'(c), d[NB-1:0], "chip0");
      mech[M_REG_START]++;
      mech[M_REG_CHAL]++;
      mech[M_REG_EN]++;
    end
    axi_read(REG_CTRL, d);
    checks++;
    if (d != 32'h0000_0005) begin failures++; $display("FAIL CTRL start bit not self-clearing %h", d); end

    // Pins only: challenge and trigger from pins, ROs enabled by the pin.
    axi_write(REG_CTRL, 32'h0000_0000);
    en_pin = 1'b1;
    for (int k = 0; k < 24; k++) begin
      chal_pin = 8'($urandom);
      @(negedge clk) tig = 1'b1;
      repeat (3) @(negedge clk);
      tig = 1'b0;
      wait_done(polls);
      // The second chip finishes at about the same time; wait for it too.
      repeat (400) @(negedge clk);
      // Only bits whose two ROs differ clearly are stable from run to run.
      mask = '0;
      for (int g = 0; g < NB; g++) mask[g] = predict(SEED0, 16, g, chal_pin[3:0], chal_pin[7:4], W, e);
      checks++;
      if ((resp0 & mask) != (first[chal_pin] & mask)) begin
        failures++;
        $display("FAIL challenge %0d not reproducible: %h then %h", chal_pin, first[chal_pin], resp0);
      end else mech[M_REPEAT]++;
      check_response(SEED1, chal_pin, resp1, "chip1");
      if (resp0 != resp1) mech[M_UNIQUE]++;
      mech[M_PIN_START]++;
      mech[M_PIN_CHAL]++;
      mech[M_PIN_EN]++;
    end

    // Stall: start with the ROs off; nothing finishes until they run.
    en_pin = 1'b0;
    chal_pin = 8'h5A;
    @(negedge clk) tig = 1'b1;
    @(negedge clk) tig = 1'b0;
    repeat (1000) @(negedge clk);
    axi_read(REG_STATUS, d);
    checks++;
    if (d[1:0] != 2'b01) begin failures++; $display("FAIL not stalled: STATUS %h", d); end
    else mech[M_STALL]++;
    // A start while busy is ignored: change the challenge and trigger again.
    axi_write(REG_CHALLENGE, 32'h0000_00A5);
    axi_write(REG_CTRL, 32'h0000_0006);  // start, register challenge, still no enable
    axi_write(REG_CTRL, 32'h0000_0001);  // now run the ROs
    wait_done(polls);
    axi_read(REG_RESPONSE, d);
    checks++;
    if (d[NB-1:0] != first[8'h5A]) begin
      failures++;
      $display("FAIL start while busy changed the result: %h expected %h", d[NB-1:0], first[8'h5A]);
    end else mech[M_BUSY_IGNORE]++;

    for (int m = 0; m < M_COUNT; m++) begin
      mech_e me;
      me = mech_e'(m);
      $display("mechanism %-16s %0d", me.name(), mech[m]);
      checks++;
      if (mech[m] == 0) begin failures++; $display("FAIL mechanism %s never happened", me.name()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
