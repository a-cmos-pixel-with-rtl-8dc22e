// tb_reversible_counter: checks the 9-bit reversible LFSR counter against a
// bit-stream reference (tb_util_pkg). It resets the counter from random
// contents with RST and nine up steps, then checks up steps, down steps,
// the full 511-state cycle, the inverse relation between up and down, and
// the static hold under STAT.
module tb_reversible_counter;
  import tb_util_pkg::*;
  logic clk = 0;
  logic phi_up, phi_down, phi2, stat, rst;
  logic [8:0] q;
  int checks = 0, failures = 0;

  reversible_counter dut (.clk, .phi_up, .phi_down, .phi2, .stat, .rst, .q);

  always #5 clk = ~clk;

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  task automatic step(bit up, bit r = 0);
    phi_up = up; phi_down = !up; rst = r; stat = 0;
    @(posedge clk); #1;
    phi_up = 0; phi_down = 0; phi2 = 1;
    @(posedge clk); #1;
    phi2 = 0; rst = 0;
  endtask

  task automatic do_reset();
    for (int i = 0; i < 9; i++) step(1, 1);
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int pos;
    bit seen [511];
    phi_up = 0; phi_down = 0; phi2 = 0; stat = 0; rst = 0;
    @(posedge clk); #1;
    do_reset();
    chk(q, 9'h1FF, "reset to all ones");
    // full up cycle
    for (int k = 1; k <= 511; k++) begin
      step(1);
      chk(q, lfsr_word(k), $sformatf("up step %0d", k));
      if (q == 0) begin failures++; $display("FAIL zero state"); end
      seen[lfsr_index(q)] = 1;
    end
    chk(q, 9'h1FF, "period 511");
    begin int n = 0; foreach (seen[i]) if (seen[i]) n++; chk(n, 511, "distinct states"); end
    // down from reset
    for (int k = 1; k <= 20; k++) begin
      step(0);
      chk(q, lfsr_word(-k), $sformatf("down step %0d", k));
    end
    // random up/down walk
    pos = -20;
    for (int i = 0; i < 400; i++) begin
      automatic bit up = 1'($urandom);
      step(up);
      pos += up ? 1 : -1;
      chk(q, lfsr_word(pos), "random walk");
    end
    // STAT hold: phi2 pulses alone with STAT keep the word
    begin
      automatic logic [8:0] held = q;
      stat = 1;
      repeat (10) begin phi2 = 1; @(posedge clk); #1; phi2 = 0; @(posedge clk); #1; end
      chk(q, held, "stat hold");
      stat = 0;
    end
    // reset again from an arbitrary word
    do_reset();
    chk(q, 9'h1FF, "second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
