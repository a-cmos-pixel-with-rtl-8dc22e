// imager_top: a 128 x 128 digital-pixel image sensor with in-pixel
// single-slope ADC, digital CDS and, in its last column, in-pixel gain
// correction.
//
// Columns 0 .. COLS-2 hold ordinary pixels (ADC and CDS); column COLS-1 holds
// gain-correction pixels whose COEFF registers form one serial chain from row
// 0 to row ROWS-1 (coeff_sdi in, coeff_sdo out). One conversion_sequencer
// drives every pixel with the same global lines, so the whole frame is
// converted in parallel; a ref_generator drives the REF lines of the GC
// column during conversion. After a frame each counter holds its result
// statically: rd_row selects a row through the row decoder, the row drives
// the column buses, and rd_col picks one bus for the 9-bit data port
// (combinational, LFSR code). Readout and the next start must not overlap;
// the counters are reset at the beginning of each frame.
//
// The analog front end (sense node and comparator) is modelled behaviourally
// inside each pixel; reset_level and photo_level are its stimulus, one 12-bit
// code per pixel on the RAMP DAC scale. ramp_code is the code the external
// RAMP DAC would be given; the comparator models read it directly.
module imager_top
  import pixel_pkg::*;
#(
  parameter int ROWS            = 128,
  parameter int COLS            = 128,
  parameter int GC_BITS         = 9,
  parameter int N_DOWN          = 511,
  parameter int N_UP            = 511,
  parameter int RAMP_START      = 3640,
  parameter int RAMP_STEP       = 6,
  parameter int TRANSFER_CYCLES = 80,
  parameter int RAW             = $clog2(ROWS),
  parameter int CAW             = $clog2(COLS)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           cds_en,
  input  logic           gc_en,
  output logic           busy,
  output logic           done,
  output ramp_t          ramp_code,
  input  logic           coeff_shift,
  input  logic           coeff_sdi,
  output logic           coeff_sdo,
  input  logic [RAW-1:0] rd_row,
  input  logic [CAW-1:0] rd_col,
  output pix_word_t      data_out,
  input  ramp_t          reset_level [ROWS][COLS],
  input  ramp_t          photo_level [ROWS][COLS]
);

  pix_ctrl_t        ctrl;
  logic             ref_clear, ref_advance;
  logic [NBITS-1:0] ref_bus;
  logic [ROWS-1:0]  row_sel;
  logic [ROWS:0]    chain;
  pix_word_t        pix     [ROWS][COLS];
  pix_word_t        col_bus [COLS];

  conversion_sequencer #(
    .N_DOWN         (N_DOWN),
    .N_UP           (N_UP),
    .RAMP_START     (RAMP_START),
    .RAMP_STEP      (RAMP_STEP),
    .TRANSFER_CYCLES(TRANSFER_CYCLES)
  ) u_seq (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .cds_en     (cds_en),
    .ctrl       (ctrl),
    .ref_clear  (ref_clear),
    .ref_advance(ref_advance),
    .busy       (busy),
    .done       (done)
  );

  assign ramp_code = ctrl.ramp;

  ref_generator u_ref (
    .clk    (clk),
    .rst_n  (rst_n),
    .enable (gc_en),
    .clear  (ref_clear),
    .advance(ref_advance),
    .ref_o  (ref_bus)
  );

  assign chain[0]  = coeff_sdi;
  assign coeff_sdo = chain[ROWS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS - 1; c++) begin : g_col
      pixel u_pix (
        .clk        (clk),
        .ctrl       (ctrl),
        .cnt_en     (ctrl.cnt_en),
        .reset_level(reset_level[r][c]),
        .photo_level(photo_level[r][c]),
        .pix_out    (pix[r][c])
      );
    end
    gc_pixel #(.GC_BITS(GC_BITS)) u_gc_pix (
      .clk        (clk),
      .ctrl       (ctrl),
      .ref_i      (ref_bus),
      .shift      (coeff_shift),
      .sdi        (chain[r]),
      .sdo        (chain[r+1]),
      .reset_level(reset_level[r][COLS-1]),
      .photo_level(photo_level[r][COLS-1]),
      .pix_out    (pix[r][COLS-1])
    );
  end

  row_decoder #(.ROWS(ROWS)) u_rowdec (
    .addr(rd_row),
    .sel (row_sel)
  );

  // Column data buses: the selected row drives every bus.
  always_comb begin
    for (int c = 0; c < COLS; c++) begin
      col_bus[c] = '0;
      for (int r = 0; r < ROWS; r++)
        if (row_sel[r]) col_bus[c] = col_bus[c] | pix[r][c];
    end
  end

  column_mux #(.COLS(COLS)) u_colmux (
    .col_bus(col_bus),
    .addr   (rd_col),
    .data   (data_out)
  );

endmodule
