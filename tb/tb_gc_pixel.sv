// tb_gc_pixel: runs whole CDS frames through a gain-correction pixel with the
// REF lines driven by the testbench (line 8 - trailing zeros of the step
// number, restarting at each sample). The decoded result is compared with
// the number of counting steps that survive blocking in each sample,
// kept(n_up) - kept(n_down). Coefficient 511 must equal the plain CDS
// result, coefficient 0 must read 0, and for 341/511 the first 26 steps of a
// sample must keep 17 counts. The coefficient itself is shifted in serially.
module tb_gc_pixel;
  import pixel_pkg::*;
  import tb_util_pkg::*;
  localparam int START = 3640, STEP = 6, NS = 511;
  logic clk = 0;
  pix_ctrl_t ctrl;
  logic [8:0] ref_i;
  logic shift, sdi, sdo;
  ramp_t reset_level, photo_level;
  pix_word_t pix_out;
  int checks = 0, failures = 0;

  gc_pixel dut (.clk, .ctrl, .ref_i, .shift, .sdi, .sdo, .reset_level, .photo_level, .pix_out);

  always #5 clk = ~clk;

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  task automatic idle();
    ctrl = '0; ctrl.pg = 1; ctrl.phi1up_n = 1; ctrl.phi1down_n = 1; ctrl.ramp = 4095; ref_i = 0;
  endtask

  task automatic tick(); @(posedge clk); #1; endtask

  task automatic sample(bit up, int nsteps);
    idle(); ctrl.ramp = START; ctrl.phi2 = 1; tick();
    for (int j = 0; j < nsteps; j++) begin
      idle(); ctrl.cnt_en = 1; ctrl.ramp = ramp_t'(START - j * STEP);
      ref_i = 9'(1 << ref_line(j + 1));
      if (up) ctrl.phi1up_n = 0; else ctrl.phi1down_n = 0;
      tick();
      ctrl.phi1up_n = 1; ctrl.phi1down_n = 1; ctrl.phi2 = 1; tick();
    end
    idle(); tick();
  endtask

  task automatic counter_reset();
    for (int i = 0; i < 9; i++) begin
      idle(); ctrl.rst = 1; ctrl.cnt_force = 1; ctrl.phi1up_n = 0; tick();
      ctrl.phi1up_n = 1; ctrl.phi2 = 1; tick();
    end
  endtask

  task automatic frame();
    counter_reset();
    idle(); ctrl.rsta = 1; tick(); tick();
    idle(); tick();
    sample(0, NS);
    idle(); tick(); ctrl.pg = 0; ctrl.tg = 1; tick(); tick(); idle(); tick();
    sample(1, NS);
  endtask

  task automatic load(int c);
    for (int i = 8; i >= 0; i--) begin sdi = c[i]; shift = 1; tick(); end
    shift = 0;
  endtask

  task automatic run(int coeff, int rl, int pl, string what);
    int ps = (rl > pl) ? rl - pl : 0;
    int nd = ramp_count(rl, START, STEP, NS);
    int nu = ramp_count(ps, START, STEP, NS);
    load(coeff);
    reset_level = ramp_t'(rl); photo_level = ramp_t'(pl);
    frame();
    chk(lfsr_index(pix_out), ((gc_count(coeff, nu) - gc_count(coeff, nd)) % 511 + 511) % 511, what);
  endtask

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    idle(); shift = 0; sdi = 0; reset_level = 0; photo_level = 0;
    tick();
    // 26 steps at 341/511 keep 17 counts (reset sample only counts down 0)
    load(341);
    reset_level = 3700; photo_level = 3700;
    counter_reset();
    idle(); ctrl.rsta = 1; tick(); idle(); tick();
    idle(); ctrl.pg = 0; ctrl.tg = 1; tick(); idle(); tick();
    sample(1, 26);
    chk(lfsr_index(pix_out), 17, "341/511: 17 of 26 steps counted");
    // coefficient 511 = plain CDS result
    run(511, 3300, 1500, "x1");
    chk(lfsr_index(pix_out), ramp_count(1800, START, STEP, NS) - ramp_count(3300, START, STEP, NS), "x1 equals CDS");
    run(0, 3300, 1500, "x0");
    chk(lfsr_index(pix_out), 0, "x0 reads 0");
    run(341, 3300, 2900, "x341 large signal");
    run(341, 3600, 100, "x341 small signal");
    for (int i = 0; i < 8; i++)
      run($urandom_range(448, 511), $urandom_range(2700, 3640), $urandom_range(0, 2500), "random 6-bit range coeff");
    for (int i = 0; i < 6; i++)
      run($urandom_range(0, 511), $urandom_range(2700, 3640), $urandom_range(0, 2500), "random coeff");
    // serial chain passes the coefficient on
    load(9'h155); chk(sdo, 1, "sdo is MSB");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
