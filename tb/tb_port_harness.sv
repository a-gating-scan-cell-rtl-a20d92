// tb_port_harness -- one adaptive_scan_port with a behavioural scan chain.
//
// Used by tb_adaptive_scan_port.  The harness models the chain the port
// talks to: on every rising edge with SE high each modelled cell stores the
// complement of the bit before it (cell 0 the complement of SI); on a rising
// edge with SE low it captures a random response r as ~r.  SO is the last
// cell.  Whenever the port has made N shifts since a load, the harness checks
// that the modelled chain holds the loaded pattern in the requested
// polarity (Qbar, or Q = ~Qbar), that the port decoded the previous capture
// correctly and that done rose on exactly the N-th shift.
`timescale 1ns/1ps
module tb_port_harness
  import gsc_pkg::*;
#(
  parameter int           N      = 5,
  parameter load_target_e TARGET = LOAD_AT_QBAR
) (
  input  logic clk,
  input  logic rst_n,
  input  logic se,
  input  logic load,
  output int   checks,
  output int   failures,
  output int   decoded
);
  logic [N-1:0] pattern, response, model_qbar, captured;
  logic         si, so, done;
  bit           have_capture = 1'b0;
  int           shifts_since_load = 0;

  adaptive_scan_port #(.SCAN_LEN(N), .TARGET(TARGET)) dut (
    .clk(clk), .rst_n(rst_n), .se(se), .load(load), .pattern(pattern),
    .so(so), .si(si), .response(response), .done(done)
  );

  assign so = model_qbar[N-1];

  initial begin
    checks = 0; failures = 0; decoded = 0;
    model_qbar = '0;
    pattern = '0;
  end

  always @(posedge load) pattern = N'($urandom);

  always @(posedge clk) begin
    if (se) begin
      model_qbar = {~model_qbar[N-2:0], ~si};
    end else begin
      captured     = N'($urandom);
      model_qbar   = ~captured;
      have_capture = 1'b1;
    end
  end

  always @(negedge clk) begin
    if (load) shifts_since_load = 0;
    else if (se) shifts_since_load++;
    #0.5;
    if (shifts_since_load > 0 && shifts_since_load < N) begin
      checks++;
      if (done !== 1'b0) begin
        failures++;
        $display("FAIL N=%0d: done early after %0d shifts", N, shifts_since_load);
      end
    end
    if (shifts_since_load == N && se) begin
      logic [N-1:0] seen;
      seen = (TARGET == LOAD_AT_QBAR) ? model_qbar : ~model_qbar;
      checks += 2;
      if (done !== 1'b1) begin
        failures++;
        $display("FAIL N=%0d: done not set after %0d shifts", N, N);
      end
      if (seen !== pattern) begin
        failures++;
        $display("FAIL N=%0d target=%0d: chain holds %b, pattern %b", N, TARGET, seen, pattern);
      end
      if (have_capture) begin
        checks++;
        decoded++;
        if (response !== captured) begin
          failures++;
          $display("FAIL N=%0d: response %b, captured %b", N, response, captured);
        end
      end
    end
  end
endmodule
