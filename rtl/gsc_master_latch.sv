// gsc_master_latch -- scan multiplexer and master latch of the gating scan cell.
//
// The shift enable SE selects the scan input SI (SE = 1, shift mode) or the
// functional input DI from the combinational logic (SE = 0, normal/capture
// mode).  The selected bit goes through the clocked pass gate into the master
// latch, which is transparent while CLK is low and holds while CLK is high.
// Like the transistor circuit, the latch has a single inverter in its forward
// path, so its output node m_n carries the complement of the selected data.
//
// Interface: clk, se, di, si in; m_n out.
// Timing: m_n follows ~(se ? si : di) while clk = 0 and freezes at the rising
// edge of clk, which together with the slave latch makes a rising-edge
// flip-flop.  The circuit is a latch by design (it is half of a master-slave
// pair); the latch warning of synthesis tools is expected here.  No reset:
// scan cells are initialised by shifting.
module gsc_master_latch (
  input  logic clk,
  input  logic se,
  input  logic di,
  input  logic si,
  output logic m_n
);

  logic d_sel;

  always_comb d_sel = se ? si : di;

  always_latch begin
    if (!clk) m_n = ~d_sel;
  end

endmodule
