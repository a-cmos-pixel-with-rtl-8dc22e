// ref_generator: the REF(8:0) reference pulse sequence for gain correction.
//
// A step counter c runs 1, 2, ..., 511, 1, ... and advances once per counting
// step. In step c exactly one line pulses: REF(k) with k = 8 - (number of
// trailing zeros of c). REF(8) thus pulses on every odd step (256 times per
// 511), REF(7) 128 times, down to REF(0), which pulses once, in step 256.
// The pulses of each line are evenly spaced and the lines never pulse
// together, so a pixel whose coefficient has 0 bits loses exactly
// 511 - coeff of 511 counts, spread as evenly as this binary rate-multiplier
// pattern allows. The pulse counts per line and their spacing follow the
// published waveform; building them from the trailing zeros of a counter is
// this design's choice.
//
// clear (at the start of each sample) sets c to 1; advance (after each
// step's phase-2 pulse) moves to the next step. ref_o is combinational from c
// and is forced to 0 when enable is low (no gain correction).
module ref_generator
  import pixel_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic             clear,
  input  logic             advance,
  output logic [NBITS-1:0] ref_o
);

  logic [NBITS-1:0] c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       c <= NBITS'(1);
    else if (clear)   c <= NBITS'(1);
    else if (advance) c <= (c == '1) ? NBITS'(1) : c + 1'b1;
  end

  always_comb begin
    ref_o = '0;
    for (int t = NBITS - 1; t >= 0; t--)
      if (c[t]) ref_o = NBITS'(1) << (NBITS - 1 - t);
    if (!enable) ref_o = '0;
  end

endmodule
