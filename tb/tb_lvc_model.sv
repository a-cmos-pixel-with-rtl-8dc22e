// tb_lvc_model: checks the light-to-voltage converter model: RSTA sets the
// sense node to the reset level, a TG pulse with PG low lowers it by the photo
// level once (clamped at 0), and TG with PG high moves no charge.
module tb_lvc_model;
  import pixel_pkg::*;
  logic clk = 0;
  logic rsta, pg, tg;
  ramp_t reset_level, photo_level, sense;
  int checks = 0, failures = 0;

  lvc_model dut (.clk, .rsta, .pg, .tg, .reset_level, .photo_level, .sense);

  always #5 clk = ~clk;

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  task automatic pulse_tg(logic pg_level, int len);
    pg = pg_level; tg = 1; repeat (len) @(posedge clk); #1; tg = 0; pg = 1; @(posedge clk); #1;
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rsta = 0; pg = 1; tg = 0; reset_level = 0; photo_level = 0;
    @(posedge clk); #1;
    for (int i = 0; i < 40; i++) begin
      automatic int rl = 1000 + $urandom_range(0, 2500);
      automatic int pl = $urandom_range(0, 1200);
      reset_level = ramp_t'(rl); photo_level = ramp_t'(pl);
      rsta = 1; repeat (3) @(posedge clk); #1; rsta = 0;
      chk(sense, rl, "after RSTA");
      pulse_tg(1'b1, 3);
      chk(sense, rl, "TG with PG high");
      pulse_tg(1'b0, 4);
      chk(sense, rl - pl, "after transfer");
      repeat (3) @(posedge clk); #1;
      chk(sense, rl - pl, "held");
    end
    reset_level = 100; photo_level = 300;
    rsta = 1; @(posedge clk); #1; rsta = 0;
    pulse_tg(1'b0, 2);
    chk(sense, 0, "clamp at 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
