// tb_gc_circuit: checks the gain-correction circuit. Two circuits (9-bit and
// 6-bit) are chained through their serial ports; coefficients are shifted in
// and read back, the chain output is checked, and CNT_EN_LOCAL is compared
// with the blocking rule (a REF pulse on a line whose coefficient bit is 0
// blocks; missing high-order bits never block) for random REF, coefficient
// and CNT_EN_GLOBAL values.
module tb_gc_circuit;
  logic clk = 0;
  logic shift, sdi, sdo9, sdo6;
  logic [8:0] ref_i;
  logic cnt_en_global, en9, en6;
  logic [8:0] coeff9;
  logic [5:0] coeff6;
  int checks = 0, failures = 0;

  gc_circuit #(.GC_BITS(9)) dut9 (.clk, .shift, .sdi, .sdo(sdo9), .ref_i, .cnt_en_global, .cnt_en_local(en9), .coeff(coeff9));
  gc_circuit #(.GC_BITS(6)) dut6 (.clk, .shift, .sdi(sdo9), .sdo(sdo6), .ref_i, .cnt_en_global, .cnt_en_local(en6), .coeff(coeff6));

  always #5 clk = ~clk;

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  // load c6 into the 6-bit (last) circuit and c9 into the first, MSB first
  task automatic load(int c9, int c6);
    automatic logic [14:0] stream = {6'(c6), 9'(c9)};
    for (int i = 14; i >= 0; i--) begin
      sdi = stream[i]; shift = 1; @(posedge clk); #1;
    end
    shift = 0;
  endtask

  function automatic bit ref_model(int coeff, int bits, logic [8:0] r, bit g);
    bit blk = 0;
    for (int k = 0; k < bits; k++) if (r[k] && !((coeff >> k) & 1)) blk = 1;
    return g && !blk;
  endfunction

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    shift = 0; sdi = 0; ref_i = 0; cnt_en_global = 0;
    @(posedge clk); #1;
    for (int t = 0; t < 30; t++) begin
      automatic int c9 = (t == 0) ? 341 : $urandom_range(0, 511);
      automatic int c6 = $urandom_range(0, 63);
      load(c9, c6);
      chk(coeff9, c9, "coeff9 load");
      chk(coeff6, c6, "coeff6 load");
      chk(sdo6, (c6 >> 5) & 1, "chain output");
      for (int i = 0; i < 40; i++) begin
        ref_i = (i < 10) ? 9'(1 << (i % 9)) : 9'($urandom);
        cnt_en_global = (i % 7 != 3);
        #1;
        chk(en9, ref_model(c9, 9, ref_i, cnt_en_global), "en9");
        chk(en6, ref_model(c6, 6, ref_i, cnt_en_global), "en6");
      end
    end
    // holding: no shift, coefficient stays
    begin
      automatic logic [8:0] h = coeff9;
      sdi = 1; repeat (5) @(posedge clk); #1;
      chk(coeff9, h, "hold without shift");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
