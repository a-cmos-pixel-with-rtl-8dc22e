// tb_ref_generator: checks the REF pulse sequence over whole 511-step cycles:
// exactly one line pulses in each step, line k pulses 2^k times per cycle,
// REF(0) pulses in step 256 and REF(1) in steps 128 and 384, the pattern
// restarts on clear and the lines stay low when the generator is disabled.
module tb_ref_generator;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  logic enable, clear, advance;
  logic [8:0] ref_o;
  int checks = 0, failures = 0;

  ref_generator dut (.clk, .rst_n, .enable, .clear, .advance, .ref_o);

  always #5 clk = ~clk;

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cnt [9];
    enable = 1; clear = 0; advance = 0;
    repeat (2) @(posedge clk); #1; rst_n = 1;
    for (int rep = 0; rep < 2; rep++) begin
      foreach (cnt[k]) cnt[k] = 0;
      clear = 1; @(posedge clk); #1; clear = 0;
      for (int c = 1; c <= 511; c++) begin
        chk($countones(ref_o), 1, "one line per step");
        chk(ref_o, 1 << ref_line(c), $sformatf("line in step %0d", c));
        if (c == 256) chk(ref_o, 1, "REF(0) at step 256");
        if (c == 128 || c == 384) chk(ref_o, 2, "REF(1) at 128/384");
        for (int k = 0; k < 9; k++) if (ref_o[k]) cnt[k]++;
        advance = 1; @(posedge clk); #1; advance = 0;
        if (c % 50 == 0) begin @(posedge clk); #1; end  // gaps between steps
      end
      for (int k = 0; k < 9; k++) chk(cnt[k], 1 << k, $sformatf("pulses on REF(%0d)", k));
      chk(ref_o, 9'h100, "wraps to step 1");
    end
    // clear in the middle restarts
    repeat (7) begin advance = 1; @(posedge clk); #1; end
    advance = 0; clear = 1; @(posedge clk); #1; clear = 0;
    chk(ref_o, 9'h100, "clear restarts");
    enable = 0; #1;
    for (int c = 0; c < 20; c++) begin
      chk(ref_o, 0, "disabled");
      advance = 1; @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
