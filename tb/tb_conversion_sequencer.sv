// tb_conversion_sequencer: runs frames of the sequencer at its default sizes
// and follows every cycle. It checks the order of the phases (counter reset,
// RSTA, first sample, PG/TG transfer, second sample), the number of PHI1DOWN,
// PHI1UP and PHI2 pulses, the RAMP code at every counting step, that CNT_EN
// covers exactly the counting steps, that RST and CNT_FORCE accompany the
// nine reset steps, the REF clear/advance strobes, and the frame length in
// cycles. A second frame in single-sampling mode must skip the first sample.
module tb_conversion_sequencer;
  import pixel_pkg::*;
  localparam int ND = 511, NU = 511, START = 3640, STEP = 6, RSTA_C = 8, XFER = 80;
  logic clk = 0, rst_n = 0, start = 0, cds_en = 1;
  pix_ctrl_t ctrl;
  logic ref_clear, ref_advance, busy, done;
  int checks = 0, failures = 0;

  conversion_sequencer dut (.clk, .rst_n, .start, .cds_en, .ctrl, .ref_clear, .ref_advance, .busy, .done);

  always #5 clk = ~clk;

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic frame(bit cds);
    int cyc = 0, n_down = 0, n_up = 0, n_phi2 = 0, n_rst_up = 0, n_rsta = 0, n_tg = 0;
    int n_clear = 0, n_adv = 0, n_cnt_en = 0, n_ramp_bad = 0, n_cnt_en_bad = 0;
    int first_rsta = -1, first_down = -1, first_tg = -1, first_up = -1, last_down = -1;
    int step = 0;
    cds_en = cds; start = 1; @(posedge clk); #1; start = 0;
    while (!done) begin
      cyc++;
      if (!ctrl.phi1down_n) begin
        if (first_down < 0) first_down = cyc;
        last_down = cyc;
        if (ctrl.ramp != ramp_t'(START - n_down * STEP)) n_ramp_bad++;
        if (!ctrl.cnt_en) n_cnt_en_bad++;
        n_down++;
      end
      if (!ctrl.phi1up_n) begin
        if (ctrl.rst) begin
          n_rst_up++;
          if (!ctrl.cnt_force) n_cnt_en_bad++;
        end else begin
          if (first_up < 0) first_up = cyc;
          if (ctrl.ramp != ramp_t'(START - n_up * STEP)) n_ramp_bad++;
          if (!ctrl.cnt_en) n_cnt_en_bad++;
          n_up++;
        end
      end
      if (ctrl.phi2) n_phi2++;
      if (ctrl.cnt_en) n_cnt_en++;
      if (ctrl.rsta) begin n_rsta++; if (first_rsta < 0) first_rsta = cyc; end
      if (ctrl.tg) begin
        n_tg++; if (first_tg < 0) first_tg = cyc;
        if (ctrl.pg) n_cnt_en_bad++;
      end
      if (ref_clear) n_clear++;
      if (ref_advance) n_adv++;
      if (!busy) n_cnt_en_bad++;
      @(posedge clk); #1;
      if (cyc > 100000) break;
    end
    chk(n_rst_up, 9, "nine reset steps");
    chk(n_down, cds ? ND : 0, "PHI1DOWN pulses");
    chk(n_up, NU, "PHI1UP pulses");
    chk(n_phi2, 9 + (cds ? ND + 1 : 0) + NU + 1, "PHI2 pulses");
    chk(n_cnt_en, 2 * ((cds ? ND : 0) + NU), "CNT_EN only over the counting steps");
    chk(n_rsta, RSTA_C, "RSTA length");
    chk(n_tg, XFER / 2, "TG length");
    chk(n_ramp_bad, 0, "RAMP code at each step");
    chk(n_cnt_en_bad, 0, "CNT_EN / CNT_FORCE / PG / busy with phases");
    chk(n_clear, cds ? 2 : 1, "REF clear per sample");
    chk(n_adv, (cds ? ND : 0) + NU, "REF advance per step");
    chk(int'(first_rsta > 18), 1, "RSTA after counter reset");
    if (cds) begin
      chk(int'(first_down > first_rsta), 1, "down sample after RSTA");
      chk(int'(first_tg > last_down), 1, "transfer after down sample");
    end
    chk(int'(first_up > first_tg), 1, "up sample after transfer");
    chk(cyc, 18 + RSTA_C + (cds ? 1 + 2 * ND : 0) + XFER + 1 + 2 * NU, "frame length in cycles");
    chk(ctrl.ramp, 4095, "RAMP parked at the top");
    @(posedge clk); #1;
    chk(busy, 0, "idle after done");
  endtask

  initial begin
    repeat (3) @(posedge clk); #1; rst_n = 1;
    @(posedge clk); #1;
    chk(busy, 0, "idle after reset");
    frame(1);
    frame(0);
    frame(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
