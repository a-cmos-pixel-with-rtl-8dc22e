// tb_comparator_model: checks the comparator decision (1 = stop when the sense
// node is above RAMP, 0 = count otherwise) on random and boundary codes, and
// that RAMP at the top code (power-down) always reads 'count'.
module tb_comparator_model;
  import pixel_pkg::*;
  ramp_t sense, ramp;
  logic cmp;
  int checks = 0, failures = 0;

  comparator_model dut (.sense, .ramp, .cmp);

  task automatic chk(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %b exp %b", what, got, exp); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      automatic int s = $urandom_range(0, 4095), r = $urandom_range(0, 4095);
      sense = ramp_t'(s); ramp = ramp_t'(r); #1;
      chk(cmp, s > r, "random");
    end
    sense = 2000; ramp = 2000; #1; chk(cmp, 0, "equal counts");
    ramp = 1999; #1; chk(cmp, 1, "one below stops");
    ramp = 4095;
    for (int s = 0; s < 3641; s += 13) begin sense = ramp_t'(s); #1; chk(cmp, 0, "power-down"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
