// tb_latch2p: checks the two-phase counter register. A LATCH2P and a LATCH2PR
// are driven with the same phase sequence: phase-1 enables load the inner node
// without changing OUT, PHI2 moves it to OUT, STAT keeps OUT across phase-2
// pulses with no phase-1, and RST forces OUT to 1 only in the LATCH2PR.
module tb_latch2p;
  logic clk = 0;
  logic phi_up, phi_down, phi2, stat, rst, in_up, in_down;
  logic out0, out1;
  int checks = 0, failures = 0;

  latch2p #(.HAS_RST(1'b0)) dut0 (.clk, .phi_up, .phi_down, .phi2, .stat, .rst, .in_up, .in_down, .out(out0));
  latch2p #(.HAS_RST(1'b1)) dut1 (.clk, .phi_up, .phi_down, .phi2, .stat, .rst, .in_up, .in_down, .out(out1));

  always #5 clk = ~clk;

  task automatic chk(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %b exp %b", what, got, exp); end
  endtask

  task automatic cyc(logic u, logic d, logic p2, logic s, logic r);
    phi_up = u; phi_down = d; phi2 = p2; stat = s; rst = r;
    @(posedge clk); #1;
    phi_up = 0; phi_down = 0; phi2 = 0; rst = 0;
  endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic model;
    phi_up = 0; phi_down = 0; phi2 = 0; stat = 0; rst = 0; in_up = 0; in_down = 0;
    @(posedge clk); #1;
    // establish a known OUT of 0 in both
    in_up = 0; cyc(1, 0, 0, 0, 0); cyc(0, 0, 1, 0, 0);
    chk(out0, 0, "init out0"); chk(out1, 0, "init out1");
    // phase 1 up does not change OUT
    in_up = 1; in_down = 0; cyc(1, 0, 0, 0, 0);
    chk(out0, 0, "phi_up alone"); chk(out1, 0, "phi_up alone r");
    in_up = 0;  // input change after phase 1 must not matter
    cyc(0, 0, 1, 0, 0);
    chk(out0, 1, "phi2 after up"); chk(out1, 1, "phi2 after up r");
    // phase 1 down
    in_down = 0; in_up = 1; cyc(0, 1, 0, 0, 0); cyc(0, 0, 1, 0, 0);
    chk(out0, 0, "down path"); chk(out1, 0, "down path r");
    // STAT hold across several phi2
    in_up = 1; in_down = 1; cyc(1, 0, 0, 0, 0); cyc(0, 0, 1, 0, 0);
    chk(out0, 1, "set 1");
    repeat (5) cyc(0, 0, 1, 1, 0);
    chk(out0, 1, "stat hold 1"); chk(out1, 1, "stat hold 1 r");
    in_up = 0; cyc(1, 0, 0, 0, 0); cyc(0, 0, 1, 0, 0);
    repeat (5) cyc(0, 0, 1, 1, 0);
    chk(out0, 0, "stat hold 0"); chk(out1, 0, "stat hold 0 r");
    // RST
    cyc(0, 0, 0, 1, 1);
    chk(out0, 0, "rst ignored without HAS_RST"); chk(out1, 1, "rst sets LATCH2PR");
    // RST wins over phi2
    in_up = 0; cyc(1, 0, 0, 0, 0); cyc(0, 0, 1, 0, 1);
    chk(out1, 1, "rst over phi2");
    // random sequences against a model of OUT via the two phases
    model = out0;
    for (int i = 0; i < 300; i++) begin
      automatic logic v = 1'($urandom);
      automatic bit dir = 1'($urandom);
      in_up = dir ? v : ~v; in_down = dir ? ~v : v;
      if (dir) cyc(1, 0, 0, 0, 0); else cyc(0, 1, 0, 0, 0);
      in_up = $urandom; in_down = $urandom;
      chk(out0, model, "random hold before phi2");
      cyc(0, 0, 1, 0, 0);
      model = v;
      chk(out0, model, "random after phi2");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
