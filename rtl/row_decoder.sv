// row_decoder: row select for readout. Decodes the row address into a one-hot
// select vector; the selected row drives its pixel words onto the column
// data buses. In the chip this is a pass-transistor decoder; here it is
// plain combinational logic. Addresses at or above ROWS select no row.
module row_decoder #(
  parameter int ROWS = 128,
  parameter int AW   = $clog2(ROWS)
) (
  input  logic [AW-1:0]   addr,
  output logic [ROWS-1:0] sel
);

  always_comb begin
    sel = '0;
    for (int r = 0; r < ROWS; r++)
      if (addr == AW'(r)) sel[r] = 1'b1;
  end

endmodule
