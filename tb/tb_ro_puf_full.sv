// Full-size testbench: the peripheral at its default parameters (eight
// response bits, 16 ROs per group, 16-bit counters). Over AXI4-Lite it
// enables the ROs, applies two challenges through the CHALLENGE register,
// starts each measurement, polls STATUS and reads RESPONSE. Each bit is
// compared with the delay-based prediction, and the measurement time with
// 2**16-1 periods of the faster RO of the slowest group.
module tb_ro_puf_full;
  import ro_puf_pkg::*;
  import tb_puf_ref_pkg::*;
  timeunit 1ns;
  timeprecision 1fs;

  localparam int unsigned W = 16;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0]  resp;
  logic [3:0]  awaddr = '0, araddr = '0;
  logic        awvalid = 1'b0, wvalid = 1'b0, bready = 1'b0, arvalid = 1'b0, rready = 1'b0;
  logic [31:0] wdata = '0;
  logic        awready, wready, bvalid, arready, rvalid;
  logic [1:0]  bresp, rresp;
  logic [31:0] rdata;

  always #5ns clk = ~clk;

  ro_puf_axi u_dut (
    .tigSignal(1'b0), .enable(1'b0), .challenges(8'h00), .response(resp),
    .s00_axi_aclk(clk), .s00_axi_aresetn(rst_n),
    .s00_axi_awaddr(awaddr), .s00_axi_awprot(3'b000), .s00_axi_awvalid(awvalid), .s00_axi_awready(awready),
    .s00_axi_wdata(wdata), .s00_axi_wstrb(4'hF), .s00_axi_wvalid(wvalid), .s00_axi_wready(wready),
    .s00_axi_bresp(bresp), .s00_axi_bvalid(bvalid), .s00_axi_bready(bready),
    .s00_axi_araddr(araddr), .s00_axi_arprot(3'b000), .s00_axi_arvalid(arvalid), .s00_axi_arready(arready),
    .s00_axi_rdata(rdata), .s00_axi_rresp(rresp), .s00_axi_rvalid(rvalid), .s00_axi_rready(rready));

  task automatic axi_write(input logic [3:0] addr, input logic [31:0] data);
    @(negedge clk);
    awaddr = addr; awvalid = 1'b1; wdata = data; wvalid = 1'b1; bready = 1'b1;
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk);
    awvalid = 1'b0; wvalid = 1'b0;
    do @(posedge clk); while (!bvalid);
    @(negedge clk);
    bready = 1'b0;
  endtask

  task automatic axi_read(input logic [3:0] addr, output logic [31:0] data);
    @(negedge clk);
    araddr = addr; arvalid = 1'b1; rready = 1'b1;
    do @(posedge clk); while (!arready);
    @(negedge clk);
    arvalid = 1'b0;
    do @(posedge clk); while (!rvalid);
    data = rdata;
    @(negedge clk);
    rready = 1'b0;
  endtask

  initial begin
    #2ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    logic [7:0] c;
    realtime t0, t1;
    real slowest, t;
    bit e;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    axi_write(REG_CTRL, 32'h0000_0005);  // enable ROs, register challenge
    for (int k = 0; k < 2; k++) begin
      c = (k == 0) ? 8'd68 : 8'($urandom);
      axi_write(REG_CHALLENGE, 32'(c));
      axi_write(REG_CTRL, 32'h0000_0007);
      t0 = $realtime;
      do axi_read(REG_STATUS, d); while (!(d[1] && !d[0]));
      t1 = $realtime;
      axi_read(REG_RESPONSE, d);
      $display("challenge=%0d response=%h time=%0.1f ns", c, d[7:0], t1 - t0);
      slowest = 0.0;
      for (int g = 0; g < 8; g++) begin
        t = eval_ns(1, 16, g, c[3:0], c[7:4], W);
        if (t > slowest) slowest = t;
        if (predict(1, 16, g, c[3:0], c[7:4], W, e)) begin
          checks++;
          if (d[g] != e) begin
            failures++;
            $display("FAIL challenge %0d bit %0d = %b expected %b", c, g, d[g], e);
          end
        end
      end
      checks++;
      if (t1 - t0 < slowest || t1 - t0 > slowest + 300.0) begin
        failures++;
        $display("FAIL challenge %0d took %0.1f ns, expected about %0.1f ns", c, t1 - t0, slowest);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
