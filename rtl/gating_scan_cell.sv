// gating_scan_cell -- low power gating scan cell.
//
// A mux-D scan flip-flop whose slave latch is replaced by the modified slave
// latch: the shift path leaves the cell through the inverted output Qbar,
// while the output Q that drives the combinational logic is gated off and
// held by state preserving feedback as long as SE is high.  In normal and
// capture mode (SE = 0) the cell is an ordinary rising-edge flip-flop with
// Q = DI of the previous rising edge and Qbar = ~Q.
//
// Interface: clk, se, di (functional data), si (scan data) in; q (to the
// combinational logic) and qbar (scan out, to the next cell's si) out.
// Timing: data is taken on the rising edge of clk; qbar changes while clk is
// high; q changes only while se = 0.  Built from latches like the circuit it
// models, so synthesis reports latches.
module gating_scan_cell (
  input  logic clk,
  input  logic se,
  input  logic di,
  input  logic si,
  output logic q,
  output logic qbar
);

  logic m_n;

  gsc_master_latch u_master (
    .clk (clk),
    .se  (se),
    .di  (di),
    .si  (si),
    .m_n (m_n)
  );

  gsc_modified_slave_latch u_slave (
    .clk  (clk),
    .se   (se),
    .m_n  (m_n),
    .qbar (qbar),
    .q    (q)
  );

endmodule
