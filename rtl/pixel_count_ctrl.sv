// pixel_count_ctrl: the control logic between the comparator and the counter
// of one pixel.
//
// A D-latch clocked by PHI2 takes the comparator output (0 = keep counting,
// 1 = stop), so the counter can only stop on a phase boundary and never sees a
// metastable comparator. The counter runs while CNT_FORCE is high, or while
// CNT_EN is high and the latch holds 'count':
//   stat     = NOR(CNT_FORCE, CNT_EN & ~Q)
//   phi_up   = NOR(stat, PHI1UP_n)
//   phi_down = NOR(stat, PHI1DOWN_n)
// These gates are the ones drawn in the pixel schematic. STAT, the inverted
// enable, also switches the counter registers to static hold.
// The latch is modelled as a register loaded on each cycle in which phi2 is
// high; the comparator value of that cycle gates the next phase-1 pulse.
module pixel_count_ctrl (
  input  logic clk,
  input  logic cmp,
  input  logic phi2,
  input  logic phi1up_n,
  input  logic phi1down_n,
  input  logic cnt_en,
  input  logic cnt_force,
  output logic stat,
  output logic phi_up,
  output logic phi_down
);

  logic q;

  always_ff @(posedge clk)
    if (phi2) q <= cmp;

  always_comb begin
    stat     = ~(cnt_force | (cnt_en & ~q));
    phi_up   = ~(stat | phi1up_n);
    phi_down = ~(stat | phi1down_n);
  end

endmodule
