// tb_gsc_master_latch -- self-checking test of the scan multiplexer and master latch.
//
// Random SE/DI/SI values are applied in both clock phases.  While CLK is low
// the node must equal the complement of the selected input; while CLK is
// high it must keep the value it had at the rising edge, whatever the inputs
// do.  The expected values come from a small reference model in this file.
`timescale 1ns/1ps
module tb_gsc_master_latch;
  logic clk = 1'b0, se = 1'b0, di = 1'b0, si = 1'b0;
  logic m_n;
  int   checks = 0, failures = 0;
  logic held;

  gsc_master_latch dut (.clk(clk), .se(se), .di(di), .si(si), .m_n(m_n));

  task automatic check(input logic exp, input string what);
    checks++;
    if (m_n !== exp) begin
      failures++;
      $display("FAIL %s: m_n=%b expected %b (se=%b di=%b si=%b clk=%b)", what, m_n, exp, se, di, si, clk);
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
    for (int it = 0; it < 400; it++) begin
      // Low phase: transparent.
      clk = 1'b0;
      repeat (3) begin
        {se, di, si} = 3'($urandom);
        #1;
        check(~(se ? si : di), "transparent");
      end
      held = ~(se ? si : di);
      // High phase: opaque.
      clk = 1'b1;
      #1;
      check(held, "edge");
      repeat (3) begin
        {se, di, si} = 3'($urandom);
        #1;
        check(held, "hold");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
