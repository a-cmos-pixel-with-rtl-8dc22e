// pixel: one digital pixel with a single-slope ADC and digital correlated
// double sampling (CDS).
//
// The light-to-voltage converter (lvc_model) produces the sense-node voltage,
// the comparator (comparator_model) compares it with the global RAMP, the
// count control (pixel_count_ctrl) gates the global phase-1 clocks, and the
// 9-bit reversible LFSR counter counts them. During the first sample the
// array counts down until RAMP falls below the reset level; during the
// second it counts up until RAMP falls below the photo level. The counter
// then holds the difference of the two samples, so the pixel's own reset
// offset cancels. pix_out is the counter word in LFSR code.
//
// cnt_en is the pixel's CNT_EN: the global line for an ordinary pixel, or the
// gain-correction circuit's CNT_EN_LOCAL. All other controls come in ctrl.
module pixel
  import pixel_pkg::*;
(
  input  logic      clk,
  input  pix_ctrl_t ctrl,
  input  logic      cnt_en,
  input  ramp_t     reset_level,
  input  ramp_t     photo_level,
  output pix_word_t pix_out
);

  ramp_t sense;
  logic  cmp, stat, phi_up, phi_down;

  lvc_model u_lvc (
    .clk        (clk),
    .rsta       (ctrl.rsta),
    .pg         (ctrl.pg),
    .tg         (ctrl.tg),
    .reset_level(reset_level),
    .photo_level(photo_level),
    .sense      (sense)
  );

  comparator_model u_cmp (
    .sense(sense),
    .ramp (ctrl.ramp),
    .cmp  (cmp)
  );

  pixel_count_ctrl u_ctrl (
    .clk       (clk),
    .cmp       (cmp),
    .phi2      (ctrl.phi2),
    .phi1up_n  (ctrl.phi1up_n),
    .phi1down_n(ctrl.phi1down_n),
    .cnt_en    (cnt_en),
    .cnt_force (ctrl.cnt_force),
    .stat      (stat),
    .phi_up    (phi_up),
    .phi_down  (phi_down)
  );

  reversible_counter u_cnt (
    .clk     (clk),
    .phi_up  (phi_up),
    .phi_down(phi_down),
    .phi2    (ctrl.phi2),
    .stat    (stat),
    .rst     (ctrl.rst),
    .q       (pix_out)
  );

endmodule
