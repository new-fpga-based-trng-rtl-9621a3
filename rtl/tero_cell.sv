// tero_cell: behavioural model of the transition effect ring oscillator
// (TERO), the entropy source of the generator. It is not synthesizable logic:
// in the FPGA the source is a loop of two LUTs configured as XNOR gates whose
// behaviour depends on placement and routing delays, which no RTL can capture.
//
// Behaviour: while `ctrl` is low the output is held at 0. A rising edge of
// `ctrl` starts a transition: after START_PS the output produces N full
// oscillation periods (a high and a low phase of HALF_PS each), then the
// oscillation dies out and the output settles to a random stable level until
// `ctrl` falls again. N is random for every period; it is drawn between
// osc_min and osc_max as the mean of four uniform draws, giving the
// single-peaked spread of counts that the measured histograms show. The
// oscillation stops early if `ctrl` falls. osc_min = osc_max = 0 models a
// source that has stopped completely.
//
// osc_min, osc_max and half_ps are variables initialised from the parameters
// so that a testbench can change the "working conditions" during a run, and
// last_count holds the N of the latest transition for checking. The
// rising-edge trigger, the reset level of 0 and the count distribution are
// this model's choices; the defaults (40..100 oscillations) follow the
// count histogram of one placement at nominal core voltage.
module tero_cell #(
  parameter int unsigned OSC_MIN  = 40,   // fewest oscillations per transition
  parameter int unsigned OSC_MAX  = 100,  // most oscillations per transition
  parameter int unsigned HALF_PS  = 500,  // half oscillation period, ps
  parameter int unsigned START_PS = 300   // delay from ctrl edge to first output edge, ps
) (
  input  logic ctrl,      // control signal: rising edge starts a transition
  output logic tero_out   // oscillator output, counted by the extractor
);
  timeunit 1ps; timeprecision 1ps;

  int unsigned osc_min = OSC_MIN;
  int unsigned osc_max = OSC_MAX;
  int unsigned half_ps = HALF_PS;
  int unsigned last_count = 0;

  logic out_q = 1'b0;
  assign tero_out = out_q;

  function automatic int unsigned draw_count(int unsigned lo, int unsigned hi);
    int unsigned span, acc;
    if (hi <= lo) return lo;
    span = hi - lo;
    acc = 0;
    for (int k = 0; k < 4; k++) acc += $urandom_range(span, 0);
    return lo + (acc + 2) / 4;
  endfunction

  initial begin
    forever begin
      @(posedge ctrl);
      #(START_PS);
      last_count = draw_count(osc_min, osc_max);
      for (int unsigned i = 0; i < last_count && ctrl; i++) begin
        out_q = 1'b1;
        #(half_ps);
        out_q = 1'b0;
        #(half_ps);
      end
      // Oscillation has died out: settle to a random stable level.
      if (ctrl) out_q = 1'($urandom_range(1, 0));
      wait (!ctrl);
      #(START_PS);
      out_q = 1'b0;
    end
  end
endmodule
