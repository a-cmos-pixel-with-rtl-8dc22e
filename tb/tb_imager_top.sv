// tb_imager_top: end-to-end test of the imager on an 8 x 8 array (seven
// ordinary columns and one gain-correction column) with the default
// conversion sizes. It loads per-row coefficients through the serial chain,
// runs CDS frames with and without REF, a single-sampling frame, and reads
// every pixel through the row decoder and column multiplexer, comparing the
// decoded word with the value expected from the pixel's levels. It counts
// how often each mechanism happened and fails if one never did: CDS and
// single-sampling frames, gain-correction blocking, counting stopped by
// CNT_EN on an overdriven pixel, counter overflow, comparator power-down by
// RAMP, the serial coefficient chain and readout.
module tb_imager_top;
  import pixel_pkg::*;
  import tb_util_pkg::*;
  localparam int ROWS = 8, COLS = 8, START = 3640, STEP = 6, NS = 511;
  logic clk = 0, rst_n = 0, start = 0, cds_en = 1, gc_en = 1;
  logic busy, done, coeff_shift = 0, coeff_sdi = 0, coeff_sdo;
  ramp_t ramp_code;
  logic [2:0] rd_row = 0, rd_col = 0;
  pix_word_t data_out;
  ramp_t reset_level [ROWS][COLS];
  ramp_t photo_level [ROWS][COLS];
  int coeff [ROWS];
  int dec [512];
  int checks = 0, failures = 0;
  int n_cds = 0, n_ss = 0, n_block = 0, n_overdrive = 0, n_overflow = 0, n_pwrdn = 0, n_chain = 0, n_read = 0;

  imager_top #(.ROWS(ROWS), .COLS(COLS)) dut (
    .clk, .rst_n, .start, .cds_en, .gc_en, .busy, .done, .ramp_code,
    .coeff_shift, .coeff_sdi, .coeff_sdo, .rd_row, .rd_col, .data_out,
    .reset_level, .photo_level);

  always #5 clk = ~clk;

  always @(posedge clk) if (busy && ramp_code == 12'd4095) n_pwrdn++;

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  task automatic tick(); @(posedge clk); #1; endtask

  task automatic load_coeffs();
    for (int r = ROWS - 1; r >= 0; r--)
      for (int i = 8; i >= 0; i--) begin coeff_sdi = coeff[r][i]; coeff_shift = 1; tick(); end
    coeff_shift = 0;
    chk(coeff_sdo, coeff[ROWS-1][8], "chain output after load");
    n_chain++;
  endtask

  task automatic set_levels();
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        reset_level[r][c] = ramp_t'($urandom_range(2800, 3600));
        photo_level[r][c] = ramp_t'($urandom_range(0, 2200));
      end
    // special pixels: overdriven (sense below the last RAMP step) and overflow
    reset_level[1][2] = 3300; photo_level[1][2] = 3300;
    reset_level[2][3] = 3700; photo_level[2][3] = 3690;
    reset_level[3][COLS-1] = 3500; photo_level[3][COLS-1] = 3500;
  endtask

  task automatic frame_and_check(bit cds, bit gc);
    int cycles = 0;
    cds_en = cds; gc_en = gc;
    start = 1; tick(); start = 0;
    while (!done && cycles < 10000) begin tick(); cycles++; end
    chk(int'(done), 1, "frame finished");
    tick();
    if (cds) n_cds++; else n_ss++;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        int rl = reset_level[r][c];
        int ps = (rl > photo_level[r][c]) ? rl - photo_level[r][c] : 0;
        int nd = cds ? ramp_count(rl, START, STEP, NS) : 0;
        int nu = ramp_count(ps, START, STEP, NS);
        int e = nu - nd;
        if (c == COLS - 1 && gc) begin
          e = gc_count(coeff[r], nu) - gc_count(coeff[r], nd);
          if (e != nu - nd) n_block++;
        end
        if (nu == NS && ps < START - (NS - 1) * STEP) n_overdrive++;
        if (e >= 511) n_overflow++;
        e = ((e % 511) + 511) % 511;
        rd_row = 3'(r); rd_col = 3'(c); #1;
        n_read++;
        chk(dec[data_out], e, $sformatf("pixel %0d,%0d cds=%0d gc=%0d", r, c, cds, gc));
      end
  endtask

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    foreach (dec[i]) dec[i] = -1;
    for (int k = 0; k < 511; k++) dec[lfsr_word(k)] = k;
    foreach (reset_level[r, c]) begin reset_level[r][c] = 0; photo_level[r][c] = 0; end
    repeat (3) tick(); rst_n = 1; tick();
    for (int r = 0; r < ROWS; r++) coeff[r] = (r == 0) ? 341 : (r == 1) ? 511 : $urandom_range(448, 511);
    load_coeffs();
    set_levels();
    frame_and_check(1, 1);
    frame_and_check(1, 0);
    frame_and_check(0, 1);
    for (int r = 0; r < ROWS; r++) coeff[r] = $urandom_range(0, 511);
    load_coeffs();
    set_levels();
    frame_and_check(1, 1);
    $display("mechanisms: cds=%0d single=%0d gc_block=%0d overdrive=%0d overflow=%0d pwrdn_cycles=%0d chain=%0d reads=%0d",
             n_cds, n_ss, n_block, n_overdrive, n_overflow, n_pwrdn, n_chain, n_read);
    chk(int'(n_cds > 0), 1, "CDS frame happened");
    chk(int'(n_ss > 0), 1, "single-sampling frame happened");
    chk(int'(n_block > 0), 1, "gain-correction blocking happened");
    chk(int'(n_overdrive > 0), 1, "CNT_EN stop of overdriven pixel happened");
    chk(int'(n_overflow > 0), 1, "counter overflow happened");
    chk(int'(n_pwrdn > 0), 1, "comparator power-down happened");
    chk(int'(n_chain > 0), 1, "coefficient chain load happened");
    chk(int'(n_read > 0), 1, "readout happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
