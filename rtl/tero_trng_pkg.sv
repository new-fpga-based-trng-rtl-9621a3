// tero_trng_pkg: constants and types shared by the TERO true random number
// generator. The counter width covers the largest oscillation counts
// measured on the target FPGA (below 190 per control period), so 8 bits are
// enough. Up to four low bits of each count are used as random data, which is
// the largest number of extracted bits evaluated for this generator.
// The system clock of 100 MHz and the 40-cycle control period (20 cycles
// high) are this design's choice: with 4 bits per period they give the
// 10 Mbit/s peak rate quoted for the generator.
package tero_trng_pkg;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned COUNT_W     = 8;   // oscillation counter width
  localparam int unsigned EXTRACT_MAX = 4;   // most random bits per sample
  localparam int unsigned CTRL_PERIOD = 40;  // clock cycles per control period
  localparam int unsigned CTRL_HIGH   = 20;  // cycles with the control signal high

  // Number of extracted bits, encoded as (bits - 1): 0 -> 1 bit ... 3 -> 4 bits.
  typedef logic [1:0] bits_sel_t;
endpackage
