// tb_adaptive_scan_port -- self-checking test of the adaptive scan port.
//
// Four ports with behavioural chains (tb_port_harness): five and six cells,
// each with the vector delivered at Qbar and at Q.  Each round loads a random
// pattern, shifts six times, lowers SE for one capture edge and raises it
// again; the next load
// follows the capture edge.  The harnesses check the shifted-in pattern, the decoded response of
// the previous capture and the timing of done.  Clock: 4 ns period.
`timescale 1ns/1ps
module tb_adaptive_scan_port;
  import gsc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, se = 1'b0, load = 1'b0;
  int   c[4], f[4], d[4];
  int   checks, failures;

  always #2 clk = ~clk;

  tb_port_harness #(.N(5), .TARGET(LOAD_AT_QBAR)) h0 (.clk(clk), .rst_n(rst_n), .se(se), .load(load), .checks(c[0]), .failures(f[0]), .decoded(d[0]));
  tb_port_harness #(.N(5), .TARGET(LOAD_AT_Q))    h1 (.clk(clk), .rst_n(rst_n), .se(se), .load(load), .checks(c[1]), .failures(f[1]), .decoded(d[1]));
  tb_port_harness #(.N(6), .TARGET(LOAD_AT_QBAR)) h2 (.clk(clk), .rst_n(rst_n), .se(se), .load(load), .checks(c[2]), .failures(f[2]), .decoded(d[2]));
  tb_port_harness #(.N(6), .TARGET(LOAD_AT_Q))    h3 (.clk(clk), .rst_n(rst_n), .se(se), .load(load), .checks(c[3]), .failures(f[3]), .decoded(d[3]));

  task automatic report(input int extra_fail);
    checks = 0; failures = extra_fail;
    for (int i = 0; i < 4; i++) begin
      checks += c[i];
      failures += f[i];
      checks++;
      if (d[i] == 0) begin
        failures++;
        $display("FAIL: harness %0d never decoded a response", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    report(1);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    for (int round = 0; round < 200; round++) begin
      // Load in the high phase after the capture edge; the port samples it
      // on the falling edge.
      load = 1'b1;
      @(negedge clk); #1;
      load = 1'b0;
      se = 1'b1;
      repeat (6) @(negedge clk);
      #1 se = 1'b0;          // capture edge follows
      @(posedge clk); #1;
    end
    @(negedge clk);
    report(0);
    $finish;
  end
endmodule
