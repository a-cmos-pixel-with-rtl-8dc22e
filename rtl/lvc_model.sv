// lvc_model: behavioural model of the light-to-voltage converter (photogate PG,
// transfer gate TG, reset transistor RSTA and the sense node). It is not
// synthesizable hardware in any useful sense: the real part is analog.
//
// The sense-node voltage is a 12-bit code on the RAMP DAC scale
// (1.8 V / 4096 per code). While RSTA is high the node is set to
// reset_level, the pixel's own reset voltage (its spread is the dark offset
// that CDS removes). On the rising edge of TG while PG is low, the charge
// collected under the photogate moves to the node and lowers it by
// photo_level, clamped at 0. Noise, leakage, dark current and the finite
// transfer are left out. Timing: sense changes on the clock edge that sees
// RSTA, or the first edge that sees TG high.
module lvc_model
  import pixel_pkg::*;
(
  input  logic  clk,
  input  logic  rsta,
  input  logic  pg,
  input  logic  tg,
  input  ramp_t reset_level,
  input  ramp_t photo_level,
  output ramp_t sense
);

  logic tg_q;

  always_ff @(posedge clk) begin
    tg_q <= tg;
    if (rsta)
      sense <= reset_level;
    else if (tg && !tg_q && !pg)
      sense <= (sense > photo_level) ? ramp_t'(sense - photo_level) : '0;
  end

endmodule
