// async_counter: asynchronous (ripple) counter of toggle flip-flops, used as
// the randomness extractor of the generator. The first stage toggles on the
// TERO output, and every further stage toggles on the output of the stage
// before it, so the counter counts the oscillations without a clock of its
// own. Its low bits are the random bits; the first stage alone is the 1-bit
// extractor.
//
// The chain of toggle stages with a common reset and all stage outputs
// brought out follows the generator's extractor diagram. This design's
// choices: each stage toggles on the falling edge of its input, so `q` is the
// number of complete oscillation periods counted up in binary; `rst` is
// asynchronous and active high; an extra sticky `ovf` flag is set when the
// most significant stage wraps, so that a count beyond 2**N cannot be taken
// for a small one.
//
// Timing: `q` settles a ripple delay after the last input edge; it must be
// read only once the oscillator has stopped (the malfunction detector samples
// it at the end of the control-high phase).
module async_counter #(
  parameter int unsigned N = tero_trng_pkg::COUNT_W   // number of stages
) (
  input  logic         clk_in,  // signal whose oscillations are counted
  input  logic         rst,     // asynchronous reset, active high
  output logic [N-1:0] q,       // count value, stage 0 is the LSB
  output logic         ovf      // set when the count wrapped past 2**N - 1
);
  timeunit 1ns; timeprecision 1ps;

  logic [N:0] stage_in;
  assign stage_in[0] = clk_in;

  for (genvar i = 0; i < N; i++) begin : g_stage
    logic t_q;  // this toggle stage
    always_ff @(negedge stage_in[i] or posedge rst) begin
      if (rst) t_q <= 1'b0;
      else     t_q <= ~t_q;
    end
    assign stage_in[i+1] = t_q;
    assign q[i]          = t_q;
  end

  always_ff @(negedge stage_in[N] or posedge rst) begin
    if (rst) ovf <= 1'b0;
    else     ovf <= 1'b1;
  end
endmodule
