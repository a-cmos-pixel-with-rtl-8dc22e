// gc_pixel: a pixel with ADC, CDS and gain correction. The gc_circuit turns the
// global CNT_EN into the pixel's own CNT_EN_LOCAL, which gates the pixel's
// counting; everything else is the ordinary pixel. The coefficient is loaded
// through the serial chain (shift, sdi, sdo) before conversion; REF arrives
// on the column data bus during conversion.
module gc_pixel
  import pixel_pkg::*;
#(
  parameter int GC_BITS = 9
) (
  input  logic             clk,
  input  pix_ctrl_t        ctrl,
  input  logic [NBITS-1:0] ref_i,
  input  logic             shift,
  input  logic             sdi,
  output logic             sdo,
  input  ramp_t            reset_level,
  input  ramp_t            photo_level,
  output pix_word_t        pix_out
);

  logic               cnt_en_local;
  logic [GC_BITS-1:0] coeff;

  gc_circuit #(.GC_BITS(GC_BITS)) u_gc (
    .clk          (clk),
    .shift        (shift),
    .sdi          (sdi),
    .sdo          (sdo),
    .ref_i        (ref_i),
    .cnt_en_global(ctrl.cnt_en),
    .cnt_en_local (cnt_en_local),
    .coeff        (coeff)
  );

  pixel u_pix (
    .clk        (clk),
    .ctrl       (ctrl),
    .cnt_en     (cnt_en_local),
    .reset_level(reset_level),
    .photo_level(photo_level),
    .pix_out    (pix_out)
  );

endmodule
