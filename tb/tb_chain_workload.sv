// tb_chain_workload -- runs one gsc_scan_top of N cells through a few test rounds.
//
// Used by tb_gsc_benchmark_chains.  Has its own 4 ns clock.  Each round loads
// a random N-bit pattern, shifts it in (N edges), launches it by lowering SE,
// captures the response of a stand-in function (di[i] = q[i] ^ q[i+1 mod N])
// and shifts that out during the next load.  Checks the pattern at Qbar and
// Q, the decoded response and that Q never moves in shift mode.  It also
// counts Qbar transitions during shift: in a chain of conventional cells
// every one of those would also reach the combinational logic.
`timescale 1ns/1ps
module tb_chain_workload #(
  parameter int N      = 245,
  parameter int ROUNDS = 3
) (
  output int checks,
  output int failures,
  output int qbar_shift_toggles,
  output int q_shift_toggles,
  output bit finished
);
  logic         clk = 1'b0, rst_n = 1'b0, se = 1'b0, load = 1'b0;
  logic [N-1:0] pattern, ppo_di, ppi_q, scan_qbar, response, expected;
  logic         so, done;
  bit           have_response = 1'b0;

  gsc_scan_top #(.SCAN_LEN(N)) dut (
    .clk(clk), .rst_n(rst_n), .se(se), .load(load), .pattern(pattern),
    .ppo_di(ppo_di), .ppi_q(ppi_q), .scan_qbar(scan_qbar), .so(so),
    .response(response), .done(done)
  );

  always_comb
    for (int i = 0; i < N; i++) ppo_di[i] = ppi_q[i] ^ ppi_q[(i + 1) % N];

  always #2 clk = ~clk;

  // Count bit transitions (not events) while SE is high.
  logic [N-1:0] last_q, last_qbar;
  always @(negedge clk) begin
    if (se && rst_n) begin
      q_shift_toggles    += $countones(ppi_q ^ last_q);
      qbar_shift_toggles += $countones(scan_qbar ^ last_qbar);
    end
    last_q    = ppi_q;
    last_qbar = scan_qbar;
  end

  task automatic expect_eq(input logic [N-1:0] got, input logic [N-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL N=%0d %s", N, what);
    end
  endtask

  initial begin
    checks = 0; failures = 0; qbar_shift_toggles = 0; q_shift_toggles = 0; finished = 0;
    pattern = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    for (int round = 0; round < ROUNDS; round++) begin
      for (int i = 0; i < N; i++) pattern[i] = 1'($urandom);
      load = 1'b1;
      @(negedge clk); #1;
      load = 1'b0;
      se = 1'b1;
      repeat (N) @(negedge clk);
      #1;
      checks++;
      if (done !== 1'b1) begin
        failures++;
        $display("FAIL N=%0d: done not set after N shifts", N);
      end
      if (have_response) expect_eq(response, expected, "decoded response");
      se = 1'b0;
      #0.5;
      expect_eq(scan_qbar, pattern, "Qbar holds the pattern");
      expect_eq(ppi_q, ~pattern, "Q launched");
      for (int i = 0; i < N; i++) expected[i] = ppi_q[i] ^ ppi_q[(i + 1) % N];
      @(posedge clk); #1;
      have_response = 1'b1;
    end
    checks++;
    if (q_shift_toggles != 0 || qbar_shift_toggles == 0) begin
      failures++;
      $display("FAIL N=%0d: Q toggles %0d, Qbar toggles %0d in shift mode", N,
               q_shift_toggles, qbar_shift_toggles);
    end
    finished = 1'b1;
  end
endmodule
