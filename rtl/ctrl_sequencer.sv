// ctrl_sequencer: produces the control signal of the TERO and the timing
// around it. Each control period lasts PERIOD clock cycles. For the first
// HIGH cycles `tero_ctrl` is high: the TERO makes its transition and the
// counter counts its oscillations. In the last high cycle `sample` is high,
// so the count is captured on the clock edge that ends the high phase. For
// the rest of the period `tero_ctrl` is low and `cnt_rst` holds the counter
// in reset, so every period starts from the same state.
//
// During system reset `cnt_rst` is low and the control signal is low, so
// the TERO is quiet; `cnt_rst` rises on the first clock after reset, which
// gives the counter's asynchronous reset a definite edge before the first
// period. `en` is looked at only at period boundaries, so only whole periods run; with
// `en` low the outputs rest at ctrl low, counter reset. All outputs are
// registered, so the control signal is free of decoding glitches.
// The period and the high time are this design's choice (40 and 20 cycles of
// a 100 MHz clock: 2.5 million periods per second); the generator is only
// described as pulsing the control signal once per extracted sample.
module ctrl_sequencer #(
  parameter int unsigned PERIOD = tero_trng_pkg::CTRL_PERIOD,  // cycles per period
  parameter int unsigned HIGH   = tero_trng_pkg::CTRL_HIGH     // cycles with ctrl high
) (
  input  logic clk,
  input  logic rst_n,      // synchronous-release reset, active low
  input  logic en,         // run control periods
  output logic tero_ctrl,  // control signal of the TERO
  output logic cnt_rst,    // counter reset, active high
  output logic sample      // capture strobe, one cycle per period
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned PW = (PERIOD > 1) ? $clog2(PERIOD) : 1;

  logic [PW-1:0] phase;    // cycle index inside the period
  logic          active;   // the current period is a running one

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= PW'(PERIOD - 1);
      active    <= 1'b0;
      tero_ctrl <= 1'b0;
      cnt_rst   <= 1'b0;  // rises on the first clock after reset: a clean edge
      sample    <= 1'b0;
    end else begin
      if (phase == PW'(PERIOD - 1)) begin
        phase  <= '0;
        active <= en;
      end else begin
        phase  <= phase + 1'b1;
      end
      // Outputs follow the phase one cycle later.
      tero_ctrl <= active && (phase < PW'(HIGH));
      cnt_rst   <= !(active && (phase < PW'(HIGH)));
      sample    <= active && (phase == PW'(HIGH - 1));
    end
  end

  initial begin
    assert (HIGH >= 1 && HIGH < PERIOD)
      else $error("ctrl_sequencer: HIGH must lie between 1 and PERIOD-1");
  end
endmodule
