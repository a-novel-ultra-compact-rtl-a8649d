// dd_puf_macro: two-bit DD-PUF macro, the unit that fills one FPGA slice.
//
// A slice offers four latches that share one gate, one clear and one enable
// signal, and four LUTs. Two DD-PUF cells (cell A and cell B, two latches
// and two inverter LUTs each) therefore fit in one slice, and both cells
// necessarily see the same START (latch gate) and RESET (latch clear). This
// module captures that grouping: it instantiates the two cells on shared
// control and returns both bits in parallel. The array is built from these
// macros so that the balanced internal routing of a macro is kept intact.
//
// Ports: reset, start (shared by both cells, active high), out[1:0]
// (out[0] = cell A, out[1] = cell B). No clock; the bits are valid once
// START has been low again after a complete evaluation phase.
//
// The two-cells-per-slice grouping and shared control follow the published
// design. The per-path delay parameters are inputs of the behavioural cell
// model and stand for process variation.
module dd_puf_macro #(
  parameter int T_P1_A_FS = 400_000,  // cell A, path P1, fs
  parameter int T_P2_A_FS = 400_000,  // cell A, path P2, fs
  parameter int T_P1_B_FS = 400_000,  // cell B, path P1, fs
  parameter int T_P2_B_FS = 400_000   // cell B, path P2, fs
) (
  input  logic       reset,
  input  logic       start,
  output logic [1:0] out
);
  timeunit 1ns;
  timeprecision 1ps;

  dd_puf_cell #(.T_P1_FS(T_P1_A_FS), .T_P2_FS(T_P2_A_FS)) u_cell_a (
    .reset(reset),
    .start(start),
    .out  (out[0])
  );

  dd_puf_cell #(.T_P1_FS(T_P1_B_FS), .T_P2_FS(T_P2_B_FS)) u_cell_b (
    .reset(reset),
    .start(start),
    .out  (out[1])
  );
endmodule
