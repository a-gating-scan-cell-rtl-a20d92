// adaptive_scan_port -- adaptive scan process for a chain of gating scan cells.
//
// A chain of gating scan cells inverts every bit once per cell it crosses, so
// the test vector cannot be shifted in as it is.  On `load` this block turns
// the parallel test vector into the adaptive test vector (every other bit
// complemented, see gsc_pkg::adaptive_flip) and presents it on `si` one bit
// per shift, the bit meant for the last cell first.  At the same time it
// collects the chain's scan output `so` and undoes the alternating inversion,
// so `response` holds the values the cells captured at Q, in cell order.
//
// Interface: clk, rst_n (asynchronous, active low), se (the chain's shift
// enable), load with pattern[SCAN_LEN], so in; si, response[SCAN_LEN],
// done out.
// Timing: the chain shifts on the rising edge of clk.  This block samples se
// on that rising edge and does everything else on the falling edge: it
// changes si and strobes so there, half a cycle away from the edge on which
// the chain's scan-out node moves.  `load` is sampled on a falling edge; the
// first bit appears on si at once and SCAN_LEN shifts complete the transfer,
// after which done = 1 and response holds the bits shifted out (the response
// captured before the load).  The falling-edge strobe and the load/done
// handshake are this design's choices.
module adaptive_scan_port
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
  input  logic                so,
  output logic                si,
  output logic [SCAN_LEN-1:0] response,
  output logic                done
);

  localparam int unsigned CW = $clog2(SCAN_LEN + 1);

  logic [SCAN_LEN-1:0] tx;       // tx[0] is the bit on si
  logic [SCAN_LEN-1:0] rx;       // rx[j]: j-th bit seen at so
  logic [SCAN_LEN-1:0] adaptive; // adaptive vector, in cell order
  logic [CW-1:0]       count;    // shifts since load
  logic                shifted;  // the last rising edge was a shift
  logic                so_d;     // so strobed on the previous falling edge

  always_comb begin
    for (int unsigned i = 0; i < SCAN_LEN; i++) begin
      adaptive[i] = pattern[i] ^ adaptive_flip(i, TARGET);
      // rx[j] holds the bit of cell SCAN_LEN-1-j.
      response[i] = rx[SCAN_LEN-1-i] ^ response_flip(SCAN_LEN - 1 - i);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) shifted <= 1'b0;
    else        shifted <= se;
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx    <= '0;
      rx    <= '0;
      count <= '0;
      so_d  <= 1'b0;
    end else begin
      so_d <= so;
      if (shifted) rx <= {so_d, rx[SCAN_LEN-1:1]};
      if (load) begin
        // Bit for the last cell goes first: reverse the cell order.
        for (int unsigned j = 0; j < SCAN_LEN; j++) tx[j] <= adaptive[SCAN_LEN-1-j];
        count <= '0;
      end else if (shifted) begin
        tx <= tx >> 1;
        if (count != CW'(SCAN_LEN)) count <= count + 1'b1;
      end
    end
  end

  assign si   = tx[0];
  assign done = (count == CW'(SCAN_LEN));

endmodule
