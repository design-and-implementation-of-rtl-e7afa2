// Reference model for the RO PUF testbenches.
//
// Predicts a response bit from the ring oscillators' loop delays alone,
// without looking at the counters or the controller: the RO with the shorter
// loop delay is faster, so its counter fills first. A prediction is only made
// when the slower counter would be at least MARGIN counts behind when the
// faster one fills; closer pairs are reported as undecided.
package tb_puf_ref_pkg;
  import ro_puf_pkg::*;
  timeunit 1ns;
  timeprecision 1fs;

  localparam real MARGIN = 6.0;

  // Returns 1 when a prediction is made and puts it in bit_o.
  function automatic bit predict(int unsigned seed, int unsigned n_ro, int unsigned group,
                                 int unsigned sel_a, int unsigned sel_b, int unsigned width,
                                 output bit bit_o);
    real ta, tb, last, lag;
    bit_o = 1'b0;
    if (sel_a == sel_b) return 1'b1;  // same RO: equal counts, "greater" is false
    ta   = real'(loop_delay_fs(seed, group * n_ro + sel_a));
    tb   = real'(loop_delay_fs(seed, group * n_ro + sel_b));
    last = real'((longint'(1) << width) - 1);
    if (ta < tb) begin
      lag   = last * (1.0 - ta / tb);
      bit_o = 1'b1;
    end else begin
      lag   = last * (1.0 - tb / ta);
      bit_o = 1'b0;
    end
    return lag >= MARGIN;
  endfunction

  // Expected measurement time in ns: 2**width-1 periods of the faster RO.
  function automatic real eval_ns(int unsigned seed, int unsigned n_ro, int unsigned group,
                                  int unsigned sel_a, int unsigned sel_b, int unsigned width);
    real ta, tb;
    ta = real'(loop_delay_fs(seed, group * n_ro + sel_a));
    tb = real'(loop_delay_fs(seed, group * n_ro + sel_b));
    return real'((longint'(1) << width) - 1) * 2.0 * ((ta < tb) ? ta : tb) / 1.0e6;
  endfunction
endpackage
