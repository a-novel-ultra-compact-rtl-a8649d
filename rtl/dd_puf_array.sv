// dd_puf_array: the DD-PUF response array, ROWS x COLS two-bit macros.
//
// With the default 8 x 8 grid this gives the 128-bit PUF of the published
// evaluation, occupying 64 slices (32 CLBs). All macros share the START and
// RESET lines, so one excitation sequence produces all bits at once and the
// whole response is read out in parallel.
//
// Macro m (m = row * COLS + col) supplies response bits 2m (cell A) and
// 2m + 1 (cell B). The path delays of every cell come from
// dd_puf_pkg::path_delay_fs with the DEVICE_SEED parameter, so two arrays
// with different seeds behave like the same design on two different chips.
//
// Ports: reset, start (active high), response[2*ROWS*COLS-1:0].
// Timing: response is stable from the moment START falls after an
// evaluation phase until the next RESET.
//
// The grid size and the shared control follow the published design; the
// bit numbering and the delay model are this design's own choices.
module dd_puf_array
  import dd_puf_pkg::path_delay_fs;
#(
  parameter int unsigned ROWS        = 8,
  parameter int unsigned COLS        = 8,
  parameter int unsigned DEVICE_SEED = 1
) (
  input  logic                     reset,
  input  logic                     start,
  output logic [2*ROWS*COLS-1:0]   response
);
  timeunit 1ns;
  timeprecision 1ps;

  for (genvar m = 0; m < ROWS * COLS; m++) begin : g_macro
    dd_puf_macro #(
      .T_P1_A_FS(path_delay_fs(DEVICE_SEED, 2 * m,     0)),
      .T_P2_A_FS(path_delay_fs(DEVICE_SEED, 2 * m,     1)),
      .T_P1_B_FS(path_delay_fs(DEVICE_SEED, 2 * m + 1, 0)),
      .T_P2_B_FS(path_delay_fs(DEVICE_SEED, 2 * m + 1, 1))
    ) u_macro (
      .reset(reset),
      .start(start),
      .out  (response[2*m+1 : 2*m])
    );
  end
endmodule
