// tb_column_mux: with random words on 128 column buses, every column address
// puts its own bus on the data port; addresses beyond a 100-column mux read 0.
module tb_column_mux;
  import pixel_pkg::*;
  pix_word_t bus [128];
  pix_word_t bus100 [100];
  logic [6:0] addr;
  pix_word_t data, data100;
  int checks = 0, failures = 0;

  column_mux #(.COLS(128)) dut (.col_bus(bus), .addr, .data);
  column_mux #(.COLS(100)) dut100 (.col_bus(bus100), .addr, .data(data100));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      foreach (bus[c]) bus[c] = 9'($urandom);
      foreach (bus100[c]) bus100[c] = 9'($urandom);
      for (int a = 0; a < 128; a++) begin
        addr = 7'(a); #1;
        checks++;
        if (data != bus[a]) begin failures++; $display("FAIL col %0d", a); end
        checks++;
        if (data100 != ((a < 100) ? bus100[a] : 9'd0)) begin failures++; $display("FAIL col100 %0d", a); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
