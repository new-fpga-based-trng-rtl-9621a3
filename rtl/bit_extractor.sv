// bit_extractor: turns an accepted oscillation count into random data. The
// randomness lies in the low bits of the count, so the extractor outputs the
// 1 to EXTRACT_MAX least significant bits of the count (number chosen at run
// time by `bits_sel` = bits - 1), with the unused high bits of `rnd_data`
// forced to zero. It registers the result: `rnd_valid` rises one cycle after
// `pass`, together with the data and the number of valid bits.
//
// Using the low bits of the counter, and 1 to 4 of them, follows the
// generator's description; the run-time selection, the zero fill and the
// registered output are this design's choices.
module bit_extractor
#(
  parameter int unsigned COUNT_W = tero_trng_pkg::COUNT_W,
  parameter int unsigned XMAX    = tero_trng_pkg::EXTRACT_MAX  // at most 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               pass,       // count_q is accepted
  input  logic [COUNT_W-1:0] count_q,    // accepted count
  input  tero_trng_pkg::bits_sel_t bits_sel,   // number of bits - 1
  output logic [XMAX-1:0]    rnd_data,   // random bits, LSB first
  output logic [2:0]         rnd_nbits,  // number of valid bits in rnd_data
  output logic               rnd_valid   // rnd_data is new (pulse)
);
  timeunit 1ns; timeprecision 1ps;

  logic [2:0]      nbits;
  logic [XMAX-1:0] mask;

  always_comb begin
    nbits = (3'(bits_sel) + 3'd1 > 3'(XMAX)) ? 3'(XMAX) : 3'(bits_sel) + 3'd1;
    for (int i = 0; i < XMAX; i++) mask[i] = (i < int'(nbits));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rnd_data  <= '0;
      rnd_nbits <= '0;
      rnd_valid <= 1'b0;
    end else begin
      rnd_valid <= pass;
      if (pass) begin
        rnd_data  <= count_q[XMAX-1:0] & mask;
        rnd_nbits <= nbits;
      end
    end
  end

  initial begin
    assert (XMAX >= 1 && XMAX <= 4 && XMAX <= COUNT_W)
      else $error("bit_extractor: XMAX must be 1..4 and no wider than the count");
  end
endmodule
