// tb_gsc_scan_top -- end-to-end test of the gating scan architecture.
//
// The top runs with its default parameters.  The circuit under test is
// stood in for by a small combinational function in this file
// (di[i] = q[i] ^ q[i+1 mod N] ^ (i odd)).  Each round:
//   1. load a random pattern into the adaptive scan port (high phase after
//      the capture edge) and shift SCAN_LEN times with SE high;
//   2. lower SE, either in the low phase before the capture edge or in the
//      high phase right after the last shift edge (the two launch cases);
//   3. give one capture edge with SE low.
// Checked: done rises on exactly the SCAN_LEN-th shift; the cells' Qbar hold
// the pattern and Q its complement (the vector stands at Qbar by default)
// once SE is low; the response read out in the next round equals the stand-in
// function of the launched vector; Q never moves while SE is high even
// though Qbar does.  Every mechanism (shift, capture, both launch cases,
// Q held during a Qbar toggle, decoded response) must occur at least once.
// Clock: 4 ns period (250 MHz).
`timescale 1ns/1ps
module tb_gsc_scan_top;
  import gsc_pkg::*;
  localparam int N = DEFAULT_SCAN_LEN;

  logic         clk = 1'b0, rst_n = 1'b0, se = 1'b0, load = 1'b0;
  logic [N-1:0] pattern = '0, ppo_di, ppi_q, scan_qbar, response;
  logic         so, done;
  int           checks = 0, failures = 0;
  int           n_shift = 0, n_capture = 0, n_launch_low = 0, n_launch_high = 0;
  int           n_q_held = 0, n_decoded = 0, q_shift_toggles = 0;
  logic [N-1:0] expected_response;
  bit           have_response = 1'b0;

  gsc_scan_top dut (
    .clk(clk), .rst_n(rst_n), .se(se), .load(load), .pattern(pattern),
    .ppo_di(ppo_di), .ppi_q(ppi_q), .scan_qbar(scan_qbar), .so(so),
    .response(response), .done(done)
  );

  // Stand-in for the combinational logic of the circuit under test.
  function automatic logic [N-1:0] cut(input logic [N-1:0] q);
    logic [N-1:0] r;
    for (int i = 0; i < N; i++) r[i] = q[i] ^ q[(i + 1) % N] ^ logic'(i % 2);
    return r;
  endfunction
  assign ppo_di = cut(ppi_q);

  always #2 clk = ~clk;

  // Transitions of Q and Qbar during shift mode.
  always @(ppi_q) if (se && rst_n) q_shift_toggles++;
  always @(scan_qbar) if (se && rst_n && $time > 0) n_q_held++;
  always @(posedge clk) if (rst_n) begin
    if (se) n_shift++; else n_capture++;
  end

  task automatic expect_eq(input logic [N-1:0] got, input logic [N-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s @%0t: got %b expected %b", what, $time, got, exp);
    end
  endtask

  task automatic finish_run(input int extra_fail);
    failures += extra_fail;
    checks += 2;
    if (q_shift_toggles != 0) begin
      failures++;
      $display("FAIL: Q changed %0d times while SE was high", q_shift_toggles);
    end
    if (n_shift == 0 || n_capture == 0 || n_launch_low == 0 || n_launch_high == 0 ||
        n_q_held == 0 || n_decoded == 0) begin
      failures++;
      $display("FAIL: a mechanism never happened");
    end
    $display("shifts=%0d captures=%0d launch_low=%0d launch_high=%0d qbar_toggles_with_q_held=%0d decoded=%0d",
             n_shift, n_capture, n_launch_low, n_launch_high, n_q_held, n_decoded);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    finish_run(1);
  end

  initial begin
    // Reset the port, then one capture so that every cell holds a value.
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    for (int round = 0; round < 300; round++) begin
      logic launch_in_high;
      int   cycles;
      launch_in_high = 1'($urandom);
      // 1. load (high phase after a capture edge), then shift.
      pattern = N'($urandom);
      load = 1'b1;
      @(negedge clk); #1;
      load = 1'b0;
      se = 1'b1;
      cycles = 0;
      for (int j = 0; j < N; j++) begin
        checks++;
        if (done !== 1'b0) begin
          failures++;
          $display("FAIL: done before shift %0d", j);
        end
        @(posedge clk); #0.5;
        cycles++;
        if (j == N - 1 && launch_in_high) begin
          se = 1'b0;                       // SE falls right after the last shift edge
          n_launch_high++;
        end
        @(negedge clk); #1;
      end
      checks++;
      if (done !== 1'b1 || cycles != N) begin
        failures++;
        $display("FAIL: done=%b after %0d shifts", done, cycles);
      end
      if (have_response) begin
        expect_eq(response, expected_response, "decoded response");
        n_decoded++;
      end
      // 2. launch: SE falls in the low phase if it has not yet.
      if (!launch_in_high) begin
        se = 1'b0;
        n_launch_low++;
      end
      #0.5;
      expect_eq(scan_qbar, pattern, "Qbar holds the pattern");
      expect_eq(ppi_q, ~pattern, "Q launched before the capture edge");
      expected_response = cut(ppi_q);
      // 3. capture edge.
      @(posedge clk); #0.5;
      expect_eq(ppi_q, expected_response, "Q after capture");
      have_response = 1'b1;
      #0.5;
    end
    finish_run(0);
  end
endmodule
