// column_mux: puts one column data bus on the 9-bit data port. In the chip the
// column buses pass through a pass-transistor demultiplexer that also lets the
// same port drive them (coefficients, REF); only the read direction is
// modelled here. Combinational; an address at or above COLS gives 0.
module column_mux
  import pixel_pkg::*;
#(
  parameter int COLS = 128,
  parameter int AW   = $clog2(COLS)
) (
  input  pix_word_t        col_bus [COLS],
  input  logic [AW-1:0]    addr,
  output pix_word_t        data
);

  always_comb begin
    data = '0;
    for (int c = 0; c < COLS; c++)
      if (addr == AW'(c)) data = col_bus[c];
  end

endmodule
