// tb_pixel_count_ctrl: checks the pixel's counting control. For every latch
// state and every combination of CNT_EN, CNT_FORCE, PHI1UP_n and PHI1DOWN_n it
// compares STAT and the gated phases with the gate equations, and checks that
// the comparator only reaches the latch on a PHI2 cycle.
module tb_pixel_count_ctrl;
  logic clk = 0;
  logic cmp, phi2, phi1up_n, phi1down_n, cnt_en, cnt_force;
  logic stat, phi_up, phi_down;
  int checks = 0, failures = 0;

  pixel_count_ctrl dut (.clk, .cmp, .phi2, .phi1up_n, .phi1down_n, .cnt_en, .cnt_force, .stat, .phi_up, .phi_down);

  always #5 clk = ~clk;

  task automatic chk(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %b exp %b", what, got, exp); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    phi2 = 0; cmp = 0; phi1up_n = 1; phi1down_n = 1; cnt_en = 0; cnt_force = 0;
    for (int l = 0; l < 2; l++) begin
      // load the latch with l
      cmp = l[0]; phi2 = 1; @(posedge clk); #1; phi2 = 0;
      // the comparator changing without PHI2 must not reach the latch
      cmp = ~l[0]; @(posedge clk); #1;
      for (int v = 0; v < 16; v++) begin
        bit counting;
        {cnt_en, cnt_force, phi1up_n, phi1down_n} = 4'(v);
        #1;
        counting = cnt_force || (cnt_en && l == 0);
        chk(stat, !counting, $sformatf("stat l=%0d v=%0d", l, v));
        chk(phi_up, counting && !phi1up_n, $sformatf("phi_up l=%0d v=%0d", l, v));
        chk(phi_down, counting && !phi1down_n, $sformatf("phi_down l=%0d v=%0d", l, v));
      end
      phi1up_n = 1; phi1down_n = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
