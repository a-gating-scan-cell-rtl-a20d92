// tb_gsc_scan_chain -- self-checking test of a chain of gating scan cells.
//
// Part 1, directed: the five-cell example of the adaptive scan process.  The
// test vector v1..v5 = 1 0 1 0 1 is shifted in as its adaptive form
// ~v1 v2 ~v3 v4 ~v5 = 0 0 0 0 0, last cell's bit first; afterwards the cells'
// Qbar outputs must hold 1 0 1 0 1.  Then the response r1..r5 = 1 0 1 0 1 is
// captured and shifted out; SO must read ~r5 r4 ~r3 r2 ~r1 = 0 0 0 0 0.
// Part 2, random: SE, SI and DI at random, every phase compared with a
// reference model (each shift stores ~SI in cell 0 and the complement of
// cell i-1 in cell i; a capture stores ~DI; Q follows ~Qbar only while SE is
// low).  Q must never move while SE is high.
`timescale 1ns/1ps
module tb_gsc_scan_chain;
  localparam int N = gsc_pkg::DEFAULT_SCAN_LEN;  // the five-cell example
  logic         clk = 1'b0, se = 1'b1, si = 1'b0;
  logic [N-1:0] di = '0;
  logic         so;
  logic [N-1:0] q, qbar;
  logic [N-1:0] ref_qbar, ref_q;
  int           checks = 0, failures = 0;
  int           q_shift_toggles = 0, qbar_shift_toggles = 0;
  int           shifts = 0, captures = 0;
  bit           armed = 1'b0;  // no checks before the first capture

  gsc_scan_chain dut (
    .clk(clk), .se(se), .si(si), .di(di), .so(so), .q(q), .qbar(qbar)
  );

  always @(q)    if (se) q_shift_toggles++;
  always @(qbar) if (se) qbar_shift_toggles++;

  task automatic check(input string what);
    if (!armed) return;
    checks++;
    if (qbar !== ref_qbar || q !== ref_q || so !== ref_qbar[N-1]) begin
      failures++;
      $display("FAIL %s @%0t: qbar=%b exp %b q=%b exp %b so=%b", what, $time,
               qbar, ref_qbar, q, ref_q, so);
    end
  endtask

  task automatic expect_bit(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  // One clock period of 4 ns; inputs set in the low phase, SE may change
  // again in the high phase.
  task automatic cycle(input logic se_low, input logic s, input logic [N-1:0] d,
                       input logic se_high);
    clk = 1'b0;
    se = se_low; si = s; di = d;
    #1;
    if (!se) ref_q = ~ref_qbar;
    check("low phase");
    #1;
    clk = 1'b1;
    if (se) begin
      ref_qbar = {~ref_qbar[N-2:0], ~si};
      shifts++;
    end else begin
      ref_qbar = ~di;
      captures++;
    end
    if (!se) ref_q = ~ref_qbar;
    #1;
    check("after edge");
    se = se_high;
    #0.5;
    if (!se) ref_q = ~ref_qbar;
    check("high phase");
    #0.5;
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] adaptive;
    logic [N-1:0] so_seen;
    // Initialise the whole chain with one capture.
    cycle(1'b0, 1'b0, '0, 1'b1);
    armed = 1'b1;

    // ---- Part 1: the printed five-cell example ----
    adaptive = 5'b00000;                    // ~v1 v2 ~v3 v4 ~v5, all zero
    for (int j = N - 1; j >= 0; j--) cycle(1'b1, adaptive[j], '0, 1'b1);
    // Cell i holds v(i+1) at Qbar: v1..v5 = 1 0 1 0 1.
    for (int i = 0; i < N; i++) expect_bit(qbar[i], (i % 2) == 0, "Qbar after adaptive shift-in");
    // Capture r1..r5 = 1 0 1 0 1 (r1 in cell 0); SE falls in the low phase.
    cycle(1'b0, 1'b0, 5'b10101, 1'b1);
    for (int i = 0; i < N; i++) expect_bit(q[i], (i % 2) == 0, "Q after capture");
    // Shift out: SO is read before every shift edge.
    for (int j = 0; j < N; j++) begin
      so_seen[j] = so;
      cycle(1'b1, 1'b0, '0, 1'b1);
    end
    for (int j = 0; j < N; j++) expect_bit(so_seen[j], 1'b0, "SO sequence ~r5 r4 ~r3 r2 ~r1");

    // ---- Part 2: random ----
    for (int it = 0; it < 3000; it++) begin
      int kind;
      kind = $urandom_range(0, 7);
      if (kind == 0)      cycle(1'b0, 1'($urandom), N'($urandom), 1'b1);  // capture
      else if (kind == 1) cycle(1'b1, 1'($urandom), N'($urandom), 1'b0);  // last shift, SE falls high
      else                cycle(1'b1, 1'($urandom), N'($urandom), 1'b1);  // shift
    end
    checks++;
    if (q_shift_toggles != 0 || qbar_shift_toggles == 0 || captures < 2) begin
      failures++;
      $display("FAIL: q_shift_toggles=%0d qbar_shift_toggles=%0d captures=%0d",
               q_shift_toggles, qbar_shift_toggles, captures);
    end
    $display("shifts=%0d captures=%0d qbar_shift_toggles=%0d q_shift_toggles=%0d",
             shifts, captures, qbar_shift_toggles, q_shift_toggles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
