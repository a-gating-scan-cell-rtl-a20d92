// gsc_scan_top -- scan test architecture built from low power gating scan cells.
//
// The flip-flops of a circuit under test are replaced by gating scan cells
// and stitched into one scan chain (gsc_scan_chain) that shares CLK and SE.
// The adaptive scan port loads test vectors into the chain and reads
// responses out of it, hiding the chain's alternating inversion.  The
// combinational logic of the circuit under test is not part of this design:
// its inputs (ppi_q, the cells' Q outputs) and outputs (ppo_di, captured by
// the cells) are ports.
//
// Test sequence: pulse `load` with a pattern, hold se = 1 for SCAN_LEN
// rising edges (done rises; response now shows the previous capture), drop
// se so that ppi_q takes the pattern, give one capture edge with se = 0, raise
// se again and repeat.  ppi_q does not move while se = 1.
//
// The chain follows the published scan architecture; the adaptive scan port,
// the default length of five cells and the default polarity (the loaded
// vector stands at Qbar) are choices of this design.
//
// Interface: clk, rst_n, se, load, pattern[SCAN_LEN], ppo_di[SCAN_LEN] in;
// ppi_q[SCAN_LEN], scan_qbar[SCAN_LEN] (the cells' scan-out nodes), so,
// response[SCAN_LEN], done out.
module gsc_scan_top
  import gsc_pkg::*;
#(
  parameter int unsigned  SCAN_LEN = gsc_pkg::DEFAULT_SCAN_LEN,
  parameter load_target_e TARGET   = LOAD_AT_QBAR
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                se,
  input  logic                load,
  input  logic [SCAN_LEN-1:0] pattern,
  input  logic [SCAN_LEN-1:0] ppo_di,
  output logic [SCAN_LEN-1:0] ppi_q,
  output logic [SCAN_LEN-1:0] scan_qbar,
  output logic                so,
  output logic [SCAN_LEN-1:0] response,
  output logic                done
);

  logic si;

  adaptive_scan_port #(
    .SCAN_LEN (SCAN_LEN),
    .TARGET   (TARGET)
  ) u_port (
    .clk      (clk),
    .rst_n    (rst_n),
    .se       (se),
    .load     (load),
    .pattern  (pattern),
    .so       (so),
    .si       (si),
    .response (response),
    .done     (done)
  );

  gsc_scan_chain #(
    .SCAN_LEN (SCAN_LEN)
  ) u_chain (
    .clk  (clk),
    .se   (se),
    .si   (si),
    .di   (ppo_di),
    .so   (so),
    .q    (ppi_q),
    .qbar (scan_qbar)
  );

endmodule
