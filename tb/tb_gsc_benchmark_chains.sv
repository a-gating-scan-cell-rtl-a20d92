// tb_gsc_benchmark_chains -- gating scan chains as long as benchmark circuits.
//
// The scan-chain power results are reported for the ITC'99 circuits b14,
// b15, b18, b21 and b22.  This test builds one gsc_scan_top for each of
// b14, b15, b21 and b22 (b18 has a test of its own, tb_gsc_b18_chain), with
// one gating scan cell per flip-flop of that circuit (245, 449, 490 and 735;
// the counts are the published ITC'99 figures), and runs a few
// full load / launch / capture / unload rounds through each.  The circuits'
// logic is not modelled: a stand-in function supplies the captured data.
// For every chain it prints the bit transitions seen at the scan path
// (Qbar) and at the outputs to the logic (Q) during shift; Q must show none.
`timescale 1ns/1ps
module tb_gsc_benchmark_chains;
  localparam int NB = 4;
  localparam string NAME [NB] = '{"b14", "b15", "b21", "b22"};
  int c[NB], f[NB], tqb[NB], tq[NB];
  bit fin[NB];
  int checks, failures;

  tb_chain_workload #(.N(245))  w0 (.checks(c[0]), .failures(f[0]), .qbar_shift_toggles(tqb[0]), .q_shift_toggles(tq[0]), .finished(fin[0]));
  tb_chain_workload #(.N(449))  w1 (.checks(c[1]), .failures(f[1]), .qbar_shift_toggles(tqb[1]), .q_shift_toggles(tq[1]), .finished(fin[1]));
  tb_chain_workload #(.N(490))  w2 (.checks(c[2]), .failures(f[2]), .qbar_shift_toggles(tqb[2]), .q_shift_toggles(tq[2]), .finished(fin[2]));
  tb_chain_workload #(.N(735))  w3 (.checks(c[3]), .failures(f[3]), .qbar_shift_toggles(tqb[3]), .q_shift_toggles(tq[3]), .finished(fin[3]));

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
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    report(0);
    $finish;
  end
endmodule
