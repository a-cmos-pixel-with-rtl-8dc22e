// tb_imager_full: one complete frame of the full 128 x 128 imager at its
// default parameters. Coefficients for the 128 gain-correction pixels are
// shifted in, every pixel gets random reset and photo levels, one CDS frame
// with REF runs, and all 16384 pixels are read through the data port and
// compared with the values expected from their levels. The frame length in
// cycles is checked as well.
module tb_imager_full;
  import pixel_pkg::*;
  import tb_util_pkg::*;
  localparam int ROWS = 128, COLS = 128, START = 3640, STEP = 6, NS = 511;
  localparam int FRAME_CYCLES = 18 + 8 + 1 + 2 * NS + 80 + 1 + 2 * NS;
  logic clk = 0, rst_n = 0, start = 0, cds_en = 1, gc_en = 1;
  logic busy, done, coeff_shift = 0, coeff_sdi = 0, coeff_sdo;
  ramp_t ramp_code;
  logic [6:0] rd_row = 0, rd_col = 0;
  pix_word_t data_out;
  ramp_t reset_level [ROWS][COLS];
  ramp_t photo_level [ROWS][COLS];
  int coeff [ROWS];
  int dec [512];
  int checks = 0, failures = 0;

  imager_top dut (
    .clk, .rst_n, .start, .cds_en, .gc_en, .busy, .done, .ramp_code,
    .coeff_shift, .coeff_sdi, .coeff_sdo, .rd_row, .rd_col, .data_out,
    .reset_level, .photo_level);

  always #5 clk = ~clk;

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic tick(); @(posedge clk); #1; endtask

  initial begin
    #100000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cycles = 0;
    foreach (dec[i]) dec[i] = -1;
    for (int k = 0; k < 511; k++) dec[lfsr_word(k)] = k;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        reset_level[r][c] = ramp_t'($urandom_range(2800, 3600));
        photo_level[r][c] = ramp_t'($urandom_range(0, 2200));
      end
    for (int r = 0; r < ROWS; r++) coeff[r] = $urandom_range(448, 511);
    repeat (3) tick(); rst_n = 1; tick();
    for (int r = ROWS - 1; r >= 0; r--)
      for (int i = 8; i >= 0; i--) begin coeff_sdi = coeff[r][i]; coeff_shift = 1; tick(); end
    coeff_shift = 0;
    start = 1; tick(); start = 0;
    while (!done && cycles < 10000) begin tick(); cycles++; end
    chk(cycles, FRAME_CYCLES, "frame length in cycles");
    tick();
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        automatic int rl = reset_level[r][c];
        automatic int ps = (rl > photo_level[r][c]) ? rl - photo_level[r][c] : 0;
        automatic int nd = ramp_count(rl, START, STEP, NS);
        automatic int nu = ramp_count(ps, START, STEP, NS);
        automatic int e = (c == COLS - 1) ? gc_count(coeff[r], nu) - gc_count(coeff[r], nd) : nu - nd;
        e = ((e % 511) + 511) % 511;
        rd_row = 7'(r); rd_col = 7'(c); #1;
        chk(dec[data_out], e, $sformatf("pixel %0d,%0d", r, c));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
