// dd_puf_device: one PUF device, a 128-bit DD-PUF with its controller and
// host interface.
//
// The device turns the chip's process variation into a 128-bit fingerprint.
// Each bit comes from a DD-PUF cell, a loop of two latches and two inverters
// whose two nominally identical paths differ in delay by a few picoseconds;
// after an oscillation the loop settles to the sign of that difference.
// Three blocks make up the device:
//
//   spi_slave     host access over SPI: set Delta_HIGH, start a read-out,
//                 poll the status, read the response;
//   dd_puf_fsm    drives the array's RESET and START through the
//                 initialization, evaluation (Delta_HIGH cycles) and output
//                 phases and captures the response;
//   dd_puf_array  ROWS x COLS two-bit macros (8 x 8 = 128 bits by default).
//
// Ports: clk (system clock, 50 MHz in the published setup), rst_n
// (asynchronous, active low), and the SPI pins sck, mosi, miso, cs_n.
// Timing: a read-out takes INIT_CYCLES + REST_CYCLES + Delta_HIGH +
// OUT_CYCLES + 1 clock cycles after the EVALUATE command byte has been
// received; the status byte shows `valid` when it is done.
//
// The block structure follows the published test setup. The array is the
// behavioural model of the FPGA macro (see dd_puf_cell), so this top
// simulates the whole device but synthesizes only the SPI slave and the
// controller; on an FPGA the array is a placed and routed hard macro.
module dd_puf_device #(
  parameter int unsigned ROWS        = 8,
  parameter int unsigned COLS        = 8,
  parameter int unsigned DEVICE_SEED = 1,   // chip identity of the model
  parameter int unsigned INIT_CYCLES = 4,
  parameter int unsigned REST_CYCLES = 4,
  parameter int unsigned OUT_CYCLES  = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sck,
  input  logic mosi,
  input  logic cs_n,
  output logic miso
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N = 2 * ROWS * COLS;

  logic [dd_puf_pkg::DHIGH_W-1:0] dhigh;
  logic                           eval_go;
  logic                           busy;
  logic                           valid;
  logic                           puf_reset;
  logic                           puf_start;
  logic [N-1:0]                   puf_out;
  logic [N-1:0]                   response;

  spi_slave #(.N(N)) u_spi (
    .clk     (clk),
    .rst_n   (rst_n),
    .sck     (sck),
    .mosi    (mosi),
    .cs_n    (cs_n),
    .miso    (miso),
    .dhigh   (dhigh),
    .eval_go (eval_go),
    .busy    (busy),
    .valid   (valid),
    .response(response)
  );

  dd_puf_fsm #(
    .N          (N),
    .INIT_CYCLES(INIT_CYCLES),
    .REST_CYCLES(REST_CYCLES),
    .OUT_CYCLES (OUT_CYCLES)
  ) u_fsm (
    .clk      (clk),
    .rst_n    (rst_n),
    .go       (eval_go),
    .dhigh    (dhigh),
    .puf_reset(puf_reset),
    .puf_start(puf_start),
    .puf_out  (puf_out),
    .response (response),
    .busy     (busy),
    .valid    (valid)
  );

  dd_puf_array #(
    .ROWS       (ROWS),
    .COLS       (COLS),
    .DEVICE_SEED(DEVICE_SEED)
  ) u_array (
    .reset   (puf_reset),
    .start   (puf_start),
    .response(puf_out)
  );
endmodule
