// reversible_counter: the 9-bit up/down LFSR counter of the pixel.
//
// Nine latch2p registers form a shift chain. Counting up shifts towards the
// higher bit and feeds bit 0 with bit8 ^ bit4; counting down shifts towards
// bit 0 and feeds bit 8 with bit0 ^ bit5, which is the exact inverse step, so
// one up step undoes one down step and the final word encodes
// (up count - down count) modulo 511. That is how the pixel subtracts its two
// samples. The all-ones word is the reset state: RST forces bit 0 (the only
// LATCH2PR) to 1 and nine up steps shift ones through the chain.
// The counter's code is pseudo-random; converting it to binary is left to
// whoever reads the image. The structure (nine registers, two XOR gates,
// reset only on the first bit) follows the pixel description; the feedback
// taps are this design's choice.
//
// A step is a phase-1 enable (phi_up or phi_down) followed by a phi2 enable
// in a later cycle; q changes on the phi2 edge.
module reversible_counter
#(
  parameter int NBITS = pixel_pkg::NBITS,
  parameter int TAP   = pixel_pkg::LFSR_TAP
) (
  input  logic             clk,
  input  logic             phi_up,
  input  logic             phi_down,
  input  logic             phi2,
  input  logic             stat,
  input  logic             rst,
  output logic [NBITS-1:0] q
);

  logic [NBITS-1:0] in_up, in_down;

  always_comb begin
    in_up[0]         = q[NBITS-1] ^ q[TAP];
    in_up[NBITS-1:1] = q[NBITS-2:0];
    in_down[NBITS-1] = q[0] ^ q[TAP+1];
    in_down[NBITS-2:0] = q[NBITS-1:1];
  end

  for (genvar i = 0; i < NBITS; i++) begin : g_bit
    latch2p #(.HAS_RST(i == 0)) u_reg (
      .clk     (clk),
      .phi_up  (phi_up),
      .phi_down(phi_down),
      .phi2    (phi2),
      .stat    (stat),
      .rst     (rst),
      .in_up   (in_up[i]),
      .in_down (in_down[i]),
      .out     (q[i])
    );
  end

endmodule
