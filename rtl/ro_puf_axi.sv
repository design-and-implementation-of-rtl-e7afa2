// RO PUF peripheral with an AXI4-Lite slave port: the top of the design.
//
// It wraps ro_puf_core for a processor. A measurement can be driven from pins
// or from registers:
//   pins      enable runs the ring oscillators, challenges[7:0] is the
//             challenge and a rising edge of tigSignal starts a measurement;
//             response[7:0] shows the last result.
//   registers (byte offsets, see ro_puf_pkg)
//     0x0 CTRL      [0] enable, ORed with the enable pin
//                   [1] start: writing 1 starts a measurement, reads as 0
//                   [2] use the CHALLENGE register instead of the pins
//     0x4 CHALLENGE [7:0]
//     0x8 STATUS    [0] busy, [1] valid (read only); busy is set from the
//                   cycle a start is taken
//     0xC RESPONSE  [RESP_BITS-1:0] (read only)
// The challenge is latched when a measurement starts. All logic runs on
// s00_axi_aclk with the active-low reset s00_axi_aresetn.
// AXI4-Lite: one write and one read at a time, write address and data taken
// in the same cycle once both are valid, OKAY responses only, WSTRB honoured
// per byte. Address bits above the register offset are not decoded, so the
// block answers anywhere in the window the interconnect gives it.
// bresp and rresp are constant OKAY by design, and the reset also appears in
// the handshake assertions' disable condition, which lint reports as a reset
// used both synchronously and asynchronously.
// The port names and widths follow the peripheral's symbol; the register map,
// the OR of the two enables and the meaning of tigSignal as a start trigger
// are this design's choices.
module ro_puf_axi
  import ro_puf_pkg::*;
#(
  parameter int unsigned C_S00_AXI_DATA_WIDTH = 32,
  parameter int unsigned C_S00_AXI_ADDR_WIDTH = 4,
  parameter int unsigned RESP_BITS            = 8,
  parameter int unsigned N_RO                 = 16,
  parameter int unsigned CNT_WIDTH            = 16,
  parameter int unsigned SEED                 = 1,
  localparam int unsigned CW = 2 * $clog2(N_RO)
) (
  input  logic                              tigSignal,
  input  logic                              enable,
  input  logic [CW-1:0]                     challenges,
  output logic [RESP_BITS-1:0]              response,

  input  logic                              s00_axi_aclk,
  input  logic                              s00_axi_aresetn,
  input  logic [C_S00_AXI_ADDR_WIDTH-1:0]   s00_axi_awaddr,
  input  logic [2:0]                        s00_axi_awprot,
  input  logic                              s00_axi_awvalid,
  output logic                              s00_axi_awready,
  input  logic [C_S00_AXI_DATA_WIDTH-1:0]   s00_axi_wdata,
  input  logic [C_S00_AXI_DATA_WIDTH/8-1:0] s00_axi_wstrb,
  input  logic                              s00_axi_wvalid,
  output logic                              s00_axi_wready,
  output logic [1:0]                        s00_axi_bresp,
  output logic                              s00_axi_bvalid,
  input  logic                              s00_axi_bready,
  input  logic [C_S00_AXI_ADDR_WIDTH-1:0]   s00_axi_araddr,
  input  logic [2:0]                        s00_axi_arprot,
  input  logic                              s00_axi_arvalid,
  output logic                              s00_axi_arready,
  output logic [C_S00_AXI_DATA_WIDTH-1:0]   s00_axi_rdata,
  output logic [1:0]                        s00_axi_rresp,
  output logic                              s00_axi_rvalid,
  input  logic                              s00_axi_rready
);
  timeunit 1ns;
  timeprecision 1fs;

  localparam int unsigned DW = C_S00_AXI_DATA_WIDTH;

  logic          clk, rst_n;
  logic [DW-1:0] ctrl_q, chal_q;
  logic          sw_start;
  logic          tig_q;
  logic          start;
  logic          puf_busy, puf_valid;
  logic          stat_busy;
  logic [CW-1:0] challenge;
  logic          wr_en;
  logic [3:0]    wr_off, rd_off;

  assign clk   = s00_axi_aclk;
  assign rst_n = s00_axi_aresetn;

  // ---------------- write channel ----------------
  assign wr_en  = s00_axi_awvalid && s00_axi_wvalid && !s00_axi_bvalid;
  assign wr_off = 4'(s00_axi_awaddr) & 4'hC;
  assign s00_axi_awready = wr_en;
  assign s00_axi_wready  = wr_en;
  assign s00_axi_bresp   = 2'b00;

  function automatic logic [DW-1:0] apply_strb(logic [DW-1:0] old_v, logic [DW-1:0] new_v,
                                               logic [DW/8-1:0] strb);
    logic [DW-1:0] r;
    r = old_v;
    for (int b = 0; b < DW / 8; b++) if (strb[b]) r[8*b +: 8] = new_v[8*b +: 8];
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_q         <= '0;
      chal_q         <= '0;
      sw_start       <= 1'b0;
      s00_axi_bvalid <= 1'b0;
    end else begin
      sw_start <= 1'b0;
      if (s00_axi_bvalid && s00_axi_bready) s00_axi_bvalid <= 1'b0;
      if (wr_en) begin
        s00_axi_bvalid <= 1'b1;
        unique case (wr_off)
          REG_CTRL: begin
            ctrl_q <= apply_strb(ctrl_q, s00_axi_wdata, s00_axi_wstrb);
            ctrl_q[CTRL_START] <= 1'b0;
            sw_start <= s00_axi_wstrb[0] && s00_axi_wdata[CTRL_START];
          end
          REG_CHALLENGE: chal_q <= apply_strb(chal_q, s00_axi_wdata, s00_axi_wstrb);
          default: ;  // read-only registers
        endcase
      end
    end
  end

  // ---------------- read channel ----------------
  assign s00_axi_arready = !s00_axi_rvalid;
  assign rd_off = 4'(s00_axi_araddr) & 4'hC;
  assign s00_axi_rresp  = 2'b00;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s00_axi_rvalid <= 1'b0;
      s00_axi_rdata  <= '0;
    end else begin
      if (s00_axi_rvalid && s00_axi_rready) s00_axi_rvalid <= 1'b0;
      if (s00_axi_arvalid && s00_axi_arready) begin
        s00_axi_rvalid <= 1'b1;
        unique case (rd_off)
          REG_CTRL:      s00_axi_rdata <= ctrl_q;
          REG_CHALLENGE: s00_axi_rdata <= chal_q;
          REG_STATUS:    s00_axi_rdata <= DW'({puf_valid && !stat_busy, stat_busy});
          default:       s00_axi_rdata <= DW'(response);
        endcase
      end
    end
  end

  // ---------------- PUF control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tig_q <= 1'b0;
    else        tig_q <= tigSignal;
  end

  assign start     = sw_start || (tigSignal && !tig_q);
  assign challenge = ctrl_q[CTRL_USE_REG] ? chal_q[CW-1:0] : challenges;
  // A start taken in this cycle already counts as busy, so a STATUS read that
  // follows a start never reports the previous result as valid.
  assign stat_busy = puf_busy || start;

  ro_puf_core #(
    .RESP_BITS (RESP_BITS),
    .N_RO      (N_RO),
    .CNT_WIDTH (CNT_WIDTH),
    .SEED      (SEED)
  ) u_core (
    .clk       (clk),
    .rst_n     (rst_n),
    .ro_enable (enable || ctrl_q[CTRL_ENABLE]),
    .start     (start),
    .challenge (challenge),
    .busy      (puf_busy),
    .valid     (puf_valid),
    .response  (response)
  );

  // ---------------- AXI handshake rules ----------------
  a_bvalid_held : assert property (@(posedge clk) disable iff (!rst_n)
    s00_axi_bvalid && !s00_axi_bready |=> s00_axi_bvalid);
  a_rvalid_held : assert property (@(posedge clk) disable iff (!rst_n)
    s00_axi_rvalid && !s00_axi_rready |=> s00_axi_rvalid && $stable(s00_axi_rdata));
  a_ready_pair  : assert property (@(posedge clk) disable iff (!rst_n)
    s00_axi_awready == s00_axi_wready);
endmodule
