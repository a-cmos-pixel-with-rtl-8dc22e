// latch2p: one bit of the in-pixel reversible counter (LATCH2P, and LATCH2PR
// when HAS_RST is set).
//
// The circuit is a two-phase dynamic register: a pass gate driven by PHI_UP
// or PHI_DOWN loads the neighbour bit (IN_UP or IN_DOWN) onto an inner node,
// and a pass gate driven by PHI2 moves the inner node to OUT. When the pixel
// stops counting, STAT closes a feedback path from OUT to the inner node so
// the value is held statically for readout. LATCH2PR, used only for the first
// bit, has a transistor that forces OUT to 1 while RST is high.
//
// Here the dynamic nodes are flip-flops on one master clock and the phases are
// one-cycle enables: on a clock edge with phi_up (or phi_down) the inner node
// takes in_up (in_down); with phi2 OUT takes the inner node; with stat and no
// phase-1 enable the inner node copies OUT. The sequencer never raises a
// phase-1 enable and phi2 in the same cycle. Charge leakage is not modelled.
module latch2p #(
  parameter bit HAS_RST = 1'b0
) (
  input  logic clk,
  input  logic phi_up,
  input  logic phi_down,
  input  logic phi2,
  input  logic stat,
  input  logic rst,
  input  logic in_up,
  input  logic in_down,
  output logic out
);

  logic mid;

  always_ff @(posedge clk) begin
    if (phi_up)        mid <= in_up;
    else if (phi_down) mid <= in_down;
    else if (stat)     mid <= out;
  end

  always_ff @(posedge clk) begin
    if (HAS_RST && rst) out <= 1'b1;
    else if (phi2)      out <= mid;
  end

endmodule
