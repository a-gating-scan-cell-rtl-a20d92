// gsc_modified_slave_latch -- slave latch with gating and state preserving logic.
//
// Three parts, in signal order:
//  * the slave pass gate, open while CLK is high, copies the master node onto
//    the scan-out node Qbar.  Qbar is also the next cell's scan input, so the
//    shift path is short and carries no output inverter;
//  * the gating logic: a pass gate that is open only while SE = 0, followed by
//    the inverter that drives Q towards the combinational logic;
//  * the state preserving logic: an inverter fed back from Q to the gating
//    inverter's input, powered only while SE = 1.  While shifting it holds Q
//    at its last value, so the ripple on Qbar never reaches the
//    combinational logic.
// With SE = 0 the gating gate is closed, the feedback is unpowered and Q is
// simply ~Qbar.
//
// Interface: clk, se, m_n (from the master latch) in; qbar (scan out) and
// q (to the combinational logic) out.
// Timing: qbar follows m_n while clk = 1.  q follows ~qbar while se = 0 and
// keeps its value while se = 1; when SE falls ahead of the capture clock, q
// takes the shifted-in bit at that moment (launch of the test vector).
// Both storage nodes are latches by design, so the latch warning of
// synthesis tools is expected here.  No reset, as in the transistor circuit.
module gsc_modified_slave_latch (
  input  logic clk,
  input  logic se,
  input  logic m_n,
  output logic qbar,
  output logic q
);

  // Slave pass gate and its storage node (scan-out node Qbar).
  always_latch begin
    if (clk) qbar = m_n;
  end

  // Gating pass gate + inverter (SE = 0) or state preserving feedback (SE = 1).
  always_latch begin
    if (!se) q = ~qbar;
  end

endmodule
