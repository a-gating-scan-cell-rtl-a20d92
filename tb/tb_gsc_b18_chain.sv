// tb_gsc_b18_chain -- a gating scan chain as long as the b18 benchmark circuit.
//
// The scan-chain power results are reported for the ITC'99 circuits b14,
// b15, b18, b21 and b22.  This test covers the largest, b18: one
// gsc_scan_top with one gating scan cell per flip-flop of b18 (3320, the
// published ITC'99 figure), and runs a few
// full load / launch / capture / unload rounds through each.  The circuits'
// logic is not modelled: a stand-in function supplies the captured data.
// It prints the bit transitions seen at the scan path
// (Qbar) and at the outputs to the logic (Q) during shift; Q must show none.
`timescale 1ns/1ps
module tb_gsc_b18_chain;
  localparam int NB = 1;
  localparam string NAME [NB] = '{"b18"};
  int c[NB], f[NB], tqb[NB], tq[NB];
  bit fin[NB];
  int checks, failures;

  tb_chain_workload #(.N(3320)) w0 (.checks(c[0]), .failures(f[0]), .qbar_shift_toggles(tqb[0]), .q_shift_toggles(tq[0]), .finished(fin[0]));

  task automatic report(input int extra_fail);
    checks = 0; failures = extra_fail;
    for (int i = 0; i < NB; i++) begin
      checks += c[i];
      failures += f[i];
      $display("%s: scan path (Qbar) transitions in shift %0d, logic inputs (Q) %0d",
               NAME[i], tqb[i], tq[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    #200000;
    $display("watchdog expired");
    report(1);
    $finish;
  end

  initial begin
    wait (fin[0]);
    report(0);
    $finish;
  end
endmodule
