// Shared constants, types and the process-variation model of the RO PUF.
//
// The PUF takes a challenge that names two ring oscillators (ROs) out of a
// group of N_RO and answers with one bit per group: which of the two runs
// faster. On silicon that speed difference comes from manufacturing
// variation. In simulation it comes from stage_delay_fs(), a hash of a
// per-device seed, the RO's index and the stage's index, so that each seed
// behaves like a different chip and each RO like a different placement.
// The nominal stage delay and the spread are this design's own choices; the
// RO structure (one enable NAND and inverters) and the 16:1 selection follow
// the architecture. The AXI register offsets and the controller's state
// encoding are also defined here.
package ro_puf_pkg;
  timeunit 1ns;
  timeprecision 1fs;

  // Delay of one RO stage: NOMINAL_FS plus a seed-dependent 0..SPREAD_FS-1.
  localparam int unsigned NOMINAL_FS = 500_000;  // 500 ps per LUT stage
  localparam int unsigned SPREAD_FS  = 25_000;   // up to 5 % variation

  // Stages of the RO: 0 = enable NAND, 1..2 = loop inverters, 3 = output inverter.
  localparam int unsigned LOOP_STAGES = 3;

  // AXI4-Lite register byte offsets of the PUF IP.
  localparam logic [3:0] REG_CTRL      = 4'h0;  // [0] enable, [1] start (self-clearing), [2] use register challenge
  localparam logic [3:0] REG_CHALLENGE = 4'h4;  // [7:0] challenge
  localparam logic [3:0] REG_STATUS    = 4'h8;  // [0] busy, [1] valid (read only)
  localparam logic [3:0] REG_RESPONSE  = 4'hC;  // [RESP_BITS-1:0] response (read only)

  localparam int unsigned CTRL_ENABLE  = 0;
  localparam int unsigned CTRL_START   = 1;
  localparam int unsigned CTRL_USE_REG = 2;

  // Evaluation controller of one response bit.
  typedef enum logic [1:0] {
    ST_IDLE,    // waiting for start; response holds the last result
    ST_CLEAR,   // counters held in reset
    ST_RUN,     // both counters count their RO's edges
    ST_FREEZE   // one counter is full; waiting for both to stop before comparing
  } puf_state_e;

  // 32-bit integer mixing (xor-shift-multiply), used only for the variation model.
  function automatic int unsigned mix32(int unsigned a, int unsigned b, int unsigned c);
    int unsigned h;
    h = (a * 32'h9E37_79B1) ^ (b * 32'h85EB_CA77) ^ (c * 32'hC2B2_AE3D);
    h = h ^ (h >> 15);
    h = h * 32'h2C1B_3C6D;
    h = h ^ (h >> 12);
    h = h * 32'h297A_2D39;
    h = h ^ (h >> 15);
    return h;
  endfunction

  // Delay in femtoseconds of one stage of one RO on the device named by seed.
  function automatic int unsigned stage_delay_fs(int unsigned seed, int unsigned ro_id,
                                                 int unsigned stage);
    return NOMINAL_FS + mix32(seed, ro_id, stage) % SPREAD_FS;
  endfunction

  // Delay around the loop, which is half the oscillation period.
  function automatic int unsigned loop_delay_fs(int unsigned seed, int unsigned ro_id);
    int unsigned d;
    d = 0;
    for (int unsigned s = 0; s < LOOP_STAGES; s++) d += stage_delay_fs(seed, ro_id, s);
    return d;
  endfunction
endpackage
