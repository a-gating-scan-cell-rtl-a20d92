// tb_gating_scan_cell -- self-checking test of one low power gating scan cell.
//
// A 4 ns clock (250 MHz).  Random DI/SI/SE values are applied while CLK is
// low and compared, in the middle of every phase, with a reference
// flip-flop model: on each rising edge the cell stores SE ? SI : DI, Qbar is
// its complement, and Q shows the stored value whenever SE is low and keeps
// its last value while SE is high.  SE is lowered both in the low phase
// before a capture edge and in the high phase right after a shift edge; in
// both cases Q must take the shifted-in bit before the capture edge.  The
// test counts Q and Qbar transitions in shift mode: Q must have none.
`timescale 1ns/1ps
module tb_gating_scan_cell;
  logic clk = 1'b0, se = 1'b1, di = 1'b0, si = 1'b0;
  logic q, qbar;
  logic stored, ref_q;
  int   checks = 0, failures = 0;
  int   q_shift_toggles = 0, qbar_shift_toggles = 0;
  int   launch_low = 0, launch_high = 0, captures = 0, shifts = 0;
  logic prev_q, prev_qbar;

  gating_scan_cell dut (.clk(clk), .se(se), .di(di), .si(si), .q(q), .qbar(qbar));

  task automatic check(input string what);
    checks++;
    if (qbar !== ~stored || q !== ref_q) begin
      failures++;
      $display("FAIL %s @%0t: q=%b exp %b, qbar=%b exp %b (se=%b)", what, $time,
               q, ref_q, qbar, ~stored, se);
    end
  endtask

  // Transition counters for shift mode (SE high).
  always @(q)    if (se) q_shift_toggles++;
  always @(qbar) if (se) qbar_shift_toggles++;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One clock: low phase (inputs applied at 1 ns), rising edge at 2 ns,
  // high phase (SE may fall at 3 ns), falling edge at 4 ns.
  task automatic cycle(input logic se_low, input logic d, input logic s,
                       input logic se_high);
    clk = 1'b0;
    se = se_low; di = d; si = s;
    #1;
    if (!se) ref_q = stored;
    check("low phase");
    #1;
    clk = 1'b1;
    stored = se ? si : di;
    if (se) shifts++; else captures++;
    if (!se) ref_q = stored;
    #1;
    check("after edge");
    se = se_high;
    #0.5;
    if (!se) ref_q = stored;
    check("high phase");
    #0.5;
  endtask

  initial begin
    // Initialise: one capture with SE low.
    cycle(1'b0, 1'b0, 1'b0, 1'b0);
    for (int it = 0; it < 3000; it++) begin
      int   kind;
      logic d, s;
      kind = $urandom_range(0, 5);
      d    = 1'($urandom);
      s    = 1'($urandom);
      case (kind)
        0: begin  // SE falls in the low phase before the capture edge
          if (se) launch_low++;
          cycle(1'b0, d, s, 1'b1);
        end
        1: begin  // last shift, SE falls in the high phase after it
          cycle(1'b1, d, s, 1'b0);
          launch_high++;
        end
        default: cycle(1'b1, d, s, 1'b1);  // shift
      endcase
    end
    checks++;
    if (q_shift_toggles != 0) begin
      failures++;
      $display("FAIL: Q toggled %0d times in shift mode", q_shift_toggles);
    end
    checks++;
    if (qbar_shift_toggles == 0 || launch_low == 0 || launch_high == 0 || captures == 0) begin
      failures++;
      $display("FAIL: a mode was never exercised");
    end
    $display("shifts=%0d captures=%0d launch_low=%0d launch_high=%0d qbar_shift_toggles=%0d q_shift_toggles=%0d",
             shifts, captures, launch_low, launch_high, qbar_shift_toggles, q_shift_toggles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
