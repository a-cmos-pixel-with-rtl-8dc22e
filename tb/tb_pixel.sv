// tb_pixel: runs whole frames through one pixel (sense-node model, comparator,
// latch and gating, LFSR counter) with the global signals driven by the
// testbench itself. Each frame resets the counter, resets the sense node,
// converts the reset level counting down, transfers the photo charge and
// converts the photo level counting up. The decoded result is compared with
// the step counts worked out from the levels: (n_up - n_down) mod 511 with
// CDS, n_up alone in single sampling. Cases include the same photo level on
// different reset levels (offset cancelled by CDS), a pixel whose comparator
// never flips (stopped by CNT_EN), counter overflow, and holding the result
// through extra PHI2 pulses during readout.
module tb_pixel;
  import pixel_pkg::*;
  import tb_util_pkg::*;
  localparam int START = 3640, STEP = 6, NS = 511;
  logic clk = 0;
  pix_ctrl_t ctrl;
  ramp_t reset_level, photo_level;
  pix_word_t pix_out;
  int checks = 0, failures = 0;

  pixel dut (.clk, .ctrl, .cnt_en(ctrl.cnt_en), .reset_level, .photo_level, .pix_out);

  always #5 clk = ~clk;

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  task automatic idle();
    ctrl = '0; ctrl.pg = 1; ctrl.phi1up_n = 1; ctrl.phi1down_n = 1; ctrl.ramp = 4095;
  endtask

  task automatic tick(); @(posedge clk); #1; endtask

  task automatic sample(bit up);
    idle(); ctrl.ramp = START; ctrl.phi2 = 1; tick();
    for (int j = 0; j < NS; j++) begin
      idle(); ctrl.cnt_en = 1; ctrl.ramp = ramp_t'(START - j * STEP);
      if (up) ctrl.phi1up_n = 0; else ctrl.phi1down_n = 0;
      tick();
      ctrl.phi1up_n = 1; ctrl.phi1down_n = 1; ctrl.phi2 = 1; tick();
    end
    idle(); tick();
  endtask

  task automatic frame(bit cds);
    for (int i = 0; i < 9; i++) begin
      idle(); ctrl.rst = 1; ctrl.cnt_force = 1; ctrl.phi1up_n = 0; tick();
      ctrl.phi1up_n = 1; ctrl.phi2 = 1; tick();
    end
    idle(); ctrl.rsta = 1; tick(); tick();
    idle(); tick();
    if (cds) sample(0);
    idle(); tick(); ctrl.pg = 0; ctrl.tg = 1; tick(); tick(); idle(); tick();
    sample(1);
  endtask

  function automatic int expect_val(int rl, int pl, bit cds);
    int ps = (rl > pl) ? rl - pl : 0;
    int nd = cds ? ramp_count(rl, START, STEP, NS) : 0;
    int nu = ramp_count(ps, START, STEP, NS);
    return ((nu - nd) % 511 + 511) % 511;
  endfunction

  task automatic run(int rl, int pl, bit cds, string what);
    reset_level = ramp_t'(rl); photo_level = ramp_t'(pl);
    frame(cds);
    chk(lfsr_index(pix_out), expect_val(rl, pl, cds), what);
  endtask

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int r0;
    idle(); reset_level = 0; photo_level = 0;
    tick();
    // CDS cancels the reset level: same photo level, different offsets
    run(3000, 600, 1, "cds offset a");
    r0 = lfsr_index(pix_out);
    run(2930, 600, 1, "cds offset b");
    chk(lfsr_index(pix_out), r0, "cds result independent of offset");
    run(3000, 0, 1, "dark with cds");
    chk(lfsr_index(pix_out), 0, "dark reads 0");
    // single sampling keeps the offset
    run(3000, 600, 0, "single sampling");
    // random levels
    for (int i = 0; i < 12; i++) begin
      automatic int rl = $urandom_range(2600, 3640);
      automatic int pl = $urandom_range(0, 2400);
      run(rl, pl, 1, "random cds");
    end
    // overdriven: sense below the lowest RAMP, counting ends with CNT_EN
    run(3200, 3200, 1, "overdriven");
    // overflow: reset sample counts 0, photo sample 511 -> wraps to 0
    run(3700, 3690, 1, "overflow");
    chk(lfsr_index(pix_out), 0, "overflow reads as dark");
    // the result holds through PHI2 pulses after conversion (readout)
    begin
      automatic int v;
      run(3100, 900, 1, "before hold");
      v = lfsr_index(pix_out);
      repeat (20) begin idle(); ctrl.phi2 = 1; tick(); idle(); tick(); end
      chk(lfsr_index(pix_out), v, "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
