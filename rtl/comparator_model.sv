// comparator_model: behavioural model of the pixel's analog comparator.
// The real part is a two-stage analog circuit; this model is only its
// decision. The non-inverting input is the sense node, the inverting input
// RAMP. The output is 1 (stop counting) when the sense node is above RAMP and
// 0 (count) otherwise. Driving RAMP to its top code (1.8 V, above any sense
// voltage) is how the comparator is powered down; its output is then 0 and
// CNT_EN keeps the counter still. Offset, noise and delay are not modelled;
// the output is combinational.
module comparator_model
  import pixel_pkg::*;
(
  input  ramp_t sense,
  input  ramp_t ramp,
  output logic  cmp
);

  assign cmp = (sense > ramp);

endmodule
