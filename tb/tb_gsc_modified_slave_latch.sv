// tb_gsc_modified_slave_latch -- self-checking test of the modified slave latch.
//
// Drives the master node, CLK and SE at random and checks, against a
// reference model kept in this file:
//  * Qbar follows the master node while CLK is high and holds while it is low;
//  * Q is ~Qbar while SE is low (gating gate closed) and keeps its value while
//    SE is high (state preserving feedback), however often Qbar toggles.
// It also counts Qbar toggles seen while SE was high, and requires some.
`timescale 1ns/1ps
module tb_gsc_modified_slave_latch;
  logic clk = 1'b0, se = 1'b0, m_n = 1'b0;
  logic qbar, q;
  logic ref_qbar, ref_q;
  int   checks = 0, failures = 0;
  int   held_toggles = 0;

  gsc_modified_slave_latch dut (.clk(clk), .se(se), .m_n(m_n), .qbar(qbar), .q(q));

  task automatic check(input string what);
    checks++;
    if (qbar !== ref_qbar || q !== ref_q) begin
      failures++;
      $display("FAIL %s: qbar=%b/%b q=%b/%b (clk=%b se=%b m_n=%b)", what,
               qbar, ref_qbar, q, ref_q, clk, se, m_n);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Initialise both nodes through their transparent phases.
    clk = 1'b1; se = 1'b0; m_n = 1'b1;
    #1;
    ref_qbar = 1'b1; ref_q = 1'b0;
    check("init");
    for (int it = 0; it < 2000; it++) begin
      logic old_qbar;
      old_qbar = ref_qbar;
      // Change one or more inputs at random.
      if ($urandom_range(0, 1) == 1) clk = ~clk;
      if ($urandom_range(0, 3) == 0) se = ~se;
      m_n = 1'($urandom);
      #1;
      if (clk) ref_qbar = m_n;
      if (!se) ref_q = ~ref_qbar;
      if (se && ref_qbar != old_qbar) held_toggles++;
      check("step");
    end
    checks++;
    if (held_toggles == 0) begin
      failures++;
      $display("FAIL: Qbar never toggled while Q was held");
    end
    $display("Qbar toggles while SE high (Q held): %0d", held_toggles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
