// gc_circuit: in-pixel gain correction by blocking counter clock pulses.
//
// The pixel's counting is gated by its own CNT_EN_LOCAL:
//   cnt_en_local = cnt_en_global & ~|(ref_i[k] & ~coeff[k])  over the GC bits
// A global generator puts one pulse on REF(k) in 2^k of every 511 counting
// steps, never on two lines in the same step. Each coefficient bit that is 0
// therefore removes 2^k of every 511 counts, and the pixel's count is scaled by
// coeff/511 (binary coefficient, independent of the counter's LFSR code).
// Since both CDS samples see the same REF sequence from their first step,
// the removed counts cancel in the offset part of the result.
//
// With GC_BITS < 9 the most significant coefficient bits and the REF lines of
// the highest frequency are dropped; those lines then never block, giving a
// coefficient range of (512 - 2^GC_BITS)/511 .. 1 with the same 1/511 step.
//
// The coefficient is held in a GC_BITS shift register, loaded serially
// through all GC circuits of the column: on a clock edge with shift high,
// coeff shifts one place towards its MSB, sdi enters at bit 0 and sdo is the
// MSB, so the first bit sent ends up as the MSB of the last circuit in the
// chain. The precharged dynamic NOR of the original is written here as
// combinational logic; cnt_en_local follows ref_i and cnt_en_global in the
// same cycle.
module gc_circuit
  import pixel_pkg::*;
#(
  parameter int GC_BITS = 9
) (
  input  logic             clk,
  input  logic             shift,
  input  logic             sdi,
  output logic             sdo,
  input  logic [NBITS-1:0] ref_i,
  input  logic             cnt_en_global,
  output logic             cnt_en_local,
  output logic [GC_BITS-1:0] coeff
);

  always_ff @(posedge clk)
    if (shift) coeff <= {coeff[GC_BITS-2:0], sdi};

  assign sdo          = coeff[GC_BITS-1];
  assign cnt_en_local = cnt_en_global & ~|(ref_i[GC_BITS-1:0] & ~coeff);

endmodule
