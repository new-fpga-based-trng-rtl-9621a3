// tero_trng: true random number generator built on the transition effect of
// a ring oscillator, with built-in malfunction detection.
//
// Once per control period the sequencer raises the TERO control signal. The
// TERO (two cross-coupled XNOR LUTs in the FPGA, a behavioural model here)
// oscillates a random number of times and then settles; an asynchronous
// ripple counter counts the oscillations. At the end of the high phase the
// malfunction detector captures the count and checks it against the window
// [th_low, th_high]. Accepted counts go to the bit extractor, which outputs
// their 1..4 least significant bits; rejected counts are dropped and raise
// `alarm`. The counter is then reset while the control signal is low, so
// every period starts from the same state and no state carries over from one
// random sample to the next.
//
// Timing at the defaults: a 100 MHz `clk`, 40 cycles per period with 20 of
// them high, so one sample every 400 ns: 10 Mbit/s with 4 bits per sample.
// `alarm` is high in the cycle right after the clock edge that captures the
// count; `rnd_valid` comes one cycle later.
// The count crosses from the oscillator's domain into `clk` without a
// synchroniser: it is captured only after the oscillation has died out, and
// a source still oscillating at that time is exactly what the window check
// rejects. The structure follows the generator's description; the clocking,
// period, window inputs and output format are this design's choices.
module tero_trng
#(
  parameter int unsigned COUNT_W     = tero_trng_pkg::COUNT_W,
  parameter int unsigned XMAX        = tero_trng_pkg::EXTRACT_MAX,
  parameter int unsigned CTRL_PERIOD = tero_trng_pkg::CTRL_PERIOD,
  parameter int unsigned CTRL_HIGH   = tero_trng_pkg::CTRL_HIGH,
  parameter int unsigned OSC_MIN     = 40,   // TERO model: fewest oscillations
  parameter int unsigned OSC_MAX     = 100,  // TERO model: most oscillations
  parameter int unsigned OSC_HALF_PS = 500   // TERO model: half period, ps
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,            // run the generator
  input  logic [COUNT_W-1:0] th_low,        // lowest accepted oscillation count
  input  logic [COUNT_W-1:0] th_high,       // highest accepted oscillation count
  input  tero_trng_pkg::bits_sel_t bits_sel,      // bits per sample - 1
  input  logic               alarm_clr,     // clears alarm_sticky
  output logic [XMAX-1:0]    rnd_data,      // random bits, LSB first
  output logic [2:0]         rnd_nbits,     // valid bits in rnd_data
  output logic               rnd_valid,     // new random data (pulse)
  output logic               alarm,         // sample rejected (pulse)
  output logic               alarm_sticky,  // alarm since last clear
  output logic [COUNT_W-1:0] osc_count      // last captured oscillation count
);
  timeunit 1ns; timeprecision 1ps;

  logic               tero_ctrl, tero_out;
  logic               cnt_rst, sample;
  logic [COUNT_W-1:0] cnt;
  logic               cnt_ovf;
  logic               pass;

  ctrl_sequencer #(.PERIOD(CTRL_PERIOD), .HIGH(CTRL_HIGH)) u_seq (
    .clk, .rst_n, .en,
    .tero_ctrl, .cnt_rst, .sample
  );

  tero_cell #(.OSC_MIN(OSC_MIN), .OSC_MAX(OSC_MAX), .HALF_PS(OSC_HALF_PS)) u_tero (
    .ctrl(tero_ctrl), .tero_out
  );

  async_counter #(.N(COUNT_W)) u_cnt (
    .clk_in(tero_out), .rst(cnt_rst), .q(cnt), .ovf(cnt_ovf)
  );

  malfunction_detector #(.COUNT_W(COUNT_W)) u_det (
    .clk, .rst_n, .sample,
    .count(cnt), .ovf(cnt_ovf),
    .th_low, .th_high, .alarm_clr,
    .count_q(osc_count), .pass, .alarm, .alarm_sticky
  );

  bit_extractor #(.COUNT_W(COUNT_W), .XMAX(XMAX)) u_ext (
    .clk, .rst_n, .pass, .count_q(osc_count), .bits_sel,
    .rnd_data, .rnd_nbits, .rnd_valid
  );
endmodule
