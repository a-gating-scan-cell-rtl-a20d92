// tb_gsc_shift_transitions -- gating scan cell against a conventional scan cell.
//
// Repeats the single-cell waveform experiment: one gating scan cell and one
// conventional scan cell get the same randomly generated CLK (4 ns, 250 MHz),
// DI, SI and SE waveforms.  SE is high in random windows of several cycles.
// Counted during the windows with SE high: transitions of the conventional
// cell's Q (which drives the logic and is its scan output), of the gating
// cell's Qbar (its scan output) and of the gating cell's Q (which drives the
// logic).  Checked: the gating cell's Q makes no transition at all in shift
// mode while the conventional Q does; both cells hold the same bit at all
// times (gating Qbar is the complement of conventional Q); and with SE low
// both show the same Q.
`timescale 1ns/1ps
module tb_gsc_shift_transitions;
  logic clk = 1'b0, se = 1'b0, di = 1'b0, si = 1'b0;
  logic q_gate, qbar_gate, q_conv;
  int   checks = 0, failures = 0;
  int   conv_q_shift = 0, gate_qbar_shift = 0, gate_q_shift = 0;
  int   windows = 0;
  bit   armed = 1'b0;

  gating_scan_cell          gate (.clk(clk), .se(se), .di(di), .si(si), .q(q_gate), .qbar(qbar_gate));
  tb_conventional_scan_cell conv (.clk(clk), .se(se), .di(di), .si(si), .q(q_conv));

  always #2 clk = ~clk;

  always @(q_conv)    if (armed && se) conv_q_shift++;
  always @(qbar_gate) if (armed && se) gate_qbar_shift++;
  always @(q_gate)    if (armed && se) gate_q_shift++;

  // Compare in the middle of each phase.
  always @(clk) if (armed) begin
    #1;
    checks++;
    if (qbar_gate !== ~q_conv || (!se && q_gate !== q_conv)) begin
      failures++;
      $display("FAIL @%0t: se=%b q_conv=%b q_gate=%b qbar_gate=%b", $time, se, q_conv, q_gate, qbar_gate);
    end
  end

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Inputs change 0.5 ns after each falling edge.
  initial begin
    @(posedge clk);            // one capture to initialise both cells
    @(negedge clk);
    armed = 1'b1;
    for (int w = 0; w < 200; w++) begin
      int normal_len, shift_len;
      normal_len = $urandom_range(1, 4);
      shift_len  = $urandom_range(2, 8);
      repeat (normal_len) begin
        #0.5; se = 1'b0; di = 1'($urandom); si = 1'($urandom);
        @(negedge clk);
      end
      windows++;
      repeat (shift_len) begin
        #0.5; se = 1'b1; di = 1'($urandom); si = 1'($urandom);
        @(negedge clk);
      end
    end
    checks++;
    if (gate_q_shift != 0 || conv_q_shift == 0 || gate_qbar_shift == 0) begin
      failures++;
      $display("FAIL: shift-mode transitions conventional Q %0d, gating Qbar %0d, gating Q %0d",
               conv_q_shift, gate_qbar_shift, gate_q_shift);
    end
    $display("shift windows=%0d; transitions to the logic in shift mode: conventional %0d, gating %0d; gating scan-out %0d",
             windows, conv_q_shift, gate_q_shift, gate_qbar_shift);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
