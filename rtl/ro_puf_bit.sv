// One response bit of the RO PUF: a group of N_RO ring oscillators, two N:1
// muxes, two RO-clocked counters, a comparator and the evaluation controller.
//
// The challenge selects RO sel_a for counter A and RO sel_b for counter B.
// A measurement starts with a one-cycle start pulse (ignored while busy):
//   ST_CLEAR   both counters are cleared for two system cycles;
//   ST_RUN     both count their RO's edges; the first to reach 2**CNT_WIDTH-1
//              raises its full flag, which also stops the other counter;
//   ST_FREEZE  once a full flag has crossed into the system clock domain, the
//              controller stops both counters and waits FREEZE_CYCLES for them
//              to settle, then samples the comparator.
// response is 1 when counter A ended higher, i.e. RO sel_a is the faster one,
// and 0 otherwise (also when sel_a equals sel_b). valid rises with the result
// and stays high until the next start; done pulses for one cycle then.
// Timing: about 2**CNT_WIDTH periods of the faster RO plus roughly 10 system
// cycles. The ROs run whenever ro_enable is high; a measurement started with
// them stopped waits until they are enabled.
// The selection of two ROs by a challenge, counting to overflow and comparing
// the counts follow the architecture; the clear/freeze sequence, the
// synchronisers and the stop of the second counter are this design's own.
module ro_puf_bit
  import ro_puf_pkg::*;
#(
  parameter int unsigned N_RO          = 16,
  parameter int unsigned CNT_WIDTH     = 16,
  parameter int unsigned SEED          = 1,
  parameter int unsigned GROUP         = 0,
  parameter int unsigned FREEZE_CYCLES = 4,
  localparam int unsigned SW = $clog2(N_RO)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ro_enable,
  input  logic                 start,
  input  logic [SW-1:0]        sel_a,
  input  logic [SW-1:0]        sel_b,
  output logic                 busy,
  output logic                 valid,
  output logic                 done,
  output logic                 response,
  output logic [CNT_WIDTH-1:0] count_a,
  output logic [CNT_WIDTH-1:0] count_b,
  output logic                 full_a,
  output logic                 full_b
);
  timeunit 1ns;
  timeprecision 1fs;

  logic [N_RO-1:0] ro_out;
  logic [SW-1:0]   sel_a_q, sel_b_q;
  logic            clk_a, clk_b;
  logic            clr, count_en;
  logic            gt;
  logic [1:0]      full_a_sync, full_b_sync;
  logic [7:0]      wait_cnt;
  puf_state_e      state;

  for (genvar i = 0; i < N_RO; i++) begin : g_ro
    ro_cell #(.SEED(SEED), .RO_ID(GROUP * N_RO + i)) u_ro (
      .enable (ro_enable),
      .fr_out (ro_out[i])
    );
  end

  ro_mux #(.N(N_RO)) u_mux_a (.ro_in(ro_out), .sel(sel_a_q), .ro_out(clk_a));
  ro_mux #(.N(N_RO)) u_mux_b (.ro_in(ro_out), .sel(sel_b_q), .ro_out(clk_b));

  ro_counter #(.WIDTH(CNT_WIDTH)) u_cnt_a (
    .ro_clk (clk_a),
    .clr    (clr),
    .run    (count_en && !full_b),
    .count  (count_a),
    .full   (full_a)
  );

  ro_counter #(.WIDTH(CNT_WIDTH)) u_cnt_b (
    .ro_clk (clk_b),
    .clr    (clr),
    .run    (count_en && !full_a),
    .count  (count_b),
    .full   (full_b)
  );

  count_compare #(.WIDTH(CNT_WIDTH)) u_cmp (.count_a(count_a), .count_b(count_b), .gt(gt));

  // Full flags into the system clock domain.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full_a_sync <= '0;
      full_b_sync <= '0;
    end else begin
      full_a_sync <= {full_a_sync[0], full_a};
      full_b_sync <= {full_b_sync[0], full_b};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= ST_IDLE;
      sel_a_q  <= '0;
      sel_b_q  <= '0;
      clr      <= 1'b1;
      count_en <= 1'b0;
      wait_cnt <= '0;
      valid    <= 1'b0;
      done     <= 1'b0;
      response <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        ST_IDLE: begin
          if (start) begin
            sel_a_q  <= sel_a;
            sel_b_q  <= sel_b;
            clr      <= 1'b1;
            valid    <= 1'b0;
            wait_cnt <= '0;
            state    <= ST_CLEAR;
          end
        end
        ST_CLEAR: begin
          wait_cnt <= wait_cnt + 1'b1;
          if (wait_cnt == 8'd1) begin
            clr      <= 1'b0;
            count_en <= 1'b1;
            state    <= ST_RUN;
          end
        end
        ST_RUN: begin
          if (full_a_sync[1] || full_b_sync[1]) begin
            count_en <= 1'b0;
            wait_cnt <= '0;
            state    <= ST_FREEZE;
          end
        end
        ST_FREEZE: begin
          wait_cnt <= wait_cnt + 1'b1;
          if (wait_cnt == 8'(FREEZE_CYCLES - 1)) begin
            response <= gt;
            valid    <= 1'b1;
            done     <= 1'b1;
            state    <= ST_IDLE;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign busy = (state != ST_IDLE);
endmodule
