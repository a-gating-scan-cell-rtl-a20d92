// gsc_scan_chain -- scan chain built from gating scan cells.
//
// SCAN_LEN cells share CLK and SE.  Cell 0 takes the chain's scan input SI,
// every further cell takes the Qbar of the cell before it, and the Qbar of
// the last cell is the scan output SO.  In parallel, cell i drives q[i] (a
// pseudo primary input of the circuit under test) and captures di[i] (a
// pseudo primary output of it) when SE is low.
//
// Because the shift path runs through Qbar, each cell inverts the bit passing
// through it: a bit shifted in ends up in cell i after i+1 inversions at Qbar.
// The adaptive scan port compensates for this.  While SE is high q[] is frozen,
// so shifting causes no transitions in the combinational logic.
//
// Interface: clk, se, si, di[SCAN_LEN] in; so, q[SCAN_LEN], qbar[SCAN_LEN] out.
// Timing: one shift per rising clock edge while se = 1, one capture per
// rising edge while se = 0.
// The chain structure (shared CLK and SE, shift path through Qbar) is the
// published scheme; the default length of five cells is this design's choice,
// taken from the worked adaptive-vector example, and is meant to be
// overridden with the flip-flop count of the circuit under test.
module gsc_scan_chain #(
  parameter int unsigned SCAN_LEN = gsc_pkg::DEFAULT_SCAN_LEN
) (
  input  logic                clk,
  input  logic                se,
  input  logic                si,
  input  logic [SCAN_LEN-1:0] di,
  output logic                so,
  output logic [SCAN_LEN-1:0] q,
  output logic [SCAN_LEN-1:0] qbar
);

  logic [SCAN_LEN:0] link;  // link[i] is the scan input of cell i

  assign link[0] = si;

  for (genvar i = 0; i < SCAN_LEN; i++) begin : g_cell
    gating_scan_cell u_cell (
      .clk  (clk),
      .se   (se),
      .di   (di[i]),
      .si   (link[i]),
      .q    (q[i]),
      .qbar (qbar[i])
    );
    assign link[i+1] = qbar[i];
  end

  assign so = link[SCAN_LEN];

endmodule
