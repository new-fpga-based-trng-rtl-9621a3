// malfunction_detector: the built-in health test of the generator. A TERO
// that works makes a number of oscillations in every control period that
// stays within a known region; a source that has stopped, or that has turned
// into a free-running oscillator, gives counts outside it. On every `sample`
// strobe the detector captures the counter value and checks it against the
// window [th_low, th_high] (bounds included). A counter that wrapped (`ovf`)
// always fails. An accepted sample gives a one-cycle `pass` pulse with the
// captured count on `count_q`; a rejected one gives a one-cycle `alarm`
// pulse, its random bits are thrown away, and `alarm_sticky` stays set until
// `alarm_clr`.
//
// Checking every count against a threshold region and discarding failing
// bits with an alarm follows the generator's description. The window bounds
// are run-time inputs because the right region depends on placement and
// core voltage; their values, the sticky flag and the one-cycle latency
// (results appear the cycle after `sample`) are this design's choices.
module malfunction_detector #(
  parameter int unsigned COUNT_W = tero_trng_pkg::COUNT_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               sample,       // capture strobe
  input  logic [COUNT_W-1:0] count,        // oscillation count of the period
  input  logic               ovf,          // counter wrapped
  input  logic [COUNT_W-1:0] th_low,       // smallest acceptable count
  input  logic [COUNT_W-1:0] th_high,      // largest acceptable count
  input  logic               alarm_clr,    // clears alarm_sticky
  output logic [COUNT_W-1:0] count_q,      // captured count
  output logic               pass,         // sample accepted (pulse)
  output logic               alarm,        // sample rejected (pulse)
  output logic               alarm_sticky  // an alarm occurred since the last clear
);
  timeunit 1ns; timeprecision 1ps;

  logic in_window;
  always_comb in_window = !ovf && (count >= th_low) && (count <= th_high);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count_q      <= '0;
      pass         <= 1'b0;
      alarm        <= 1'b0;
      alarm_sticky <= 1'b0;
    end else begin
      pass  <= sample && in_window;
      alarm <= sample && !in_window;
      if (sample) count_q <= count;
      if (sample && !in_window) alarm_sticky <= 1'b1;
      else if (alarm_clr)       alarm_sticky <= 1'b0;
    end
  end

  // An accepted and a rejected sample never coincide.
  a_pass_xor_alarm: assert property (@(posedge clk) disable iff (!rst_n) !(pass && alarm));
endmodule
