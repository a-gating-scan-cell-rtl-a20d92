// tb_conventional_scan_cell -- behavioural model of a conventional mux-D scan cell.
//
// Reference for tb_gsc_shift_transitions only.  SE selects SI or DI, the
// value is stored on the rising edge of CLK and appears at Q, which both
// drives the combinational logic and is the scan output.  Q therefore
// follows every shifted bit.
`timescale 1ns/1ps
module tb_conventional_scan_cell (
  input  logic clk,
  input  logic se,
  input  logic di,
  input  logic si,
  output logic q
);
  always_ff @(posedge clk) q <= se ? si : di;
endmodule
