// tb_row_decoder: every address of a 128-row decoder selects exactly its row.
module tb_row_decoder;
  logic [6:0] addr;
  logic [127:0] sel;
  int checks = 0, failures = 0;

  row_decoder #(.ROWS(128)) dut (.addr, .sel);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int a = 0; a < 128; a++) begin
      addr = 7'(a); #1;
      checks++;
      if (sel != (128'(1) << a)) begin failures++; $display("FAIL addr %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
