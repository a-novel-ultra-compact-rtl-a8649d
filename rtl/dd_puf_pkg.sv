// dd_puf_pkg: types and constants shared by the DD-PUF device.
//
// Holds the response width of the PUF array, the SPI command codes, the
// states of the excitation controller, and the process-variation model used
// by the behavioural bit cells: every signal path of every cell gets a
// pseudo-random delay around a nominal value, derived by hashing a device
// seed with the cell index. Different seeds stand for different chips; the
// same seed always gives the same chip.
//
// The 128-bit array (64 two-bit macros in an 8x8 grid) and the Delta_HIGH
// range of up to 256 clock cycles follow the published design. The SPI
// command set, the delay figures and the hash are this design's own choices.
package dd_puf_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  // Response width of the full array: 8 x 8 macros of 2 bits each.
  localparam int unsigned N_BITS = 128;

  // Width of the Delta_HIGH register; START is held for (value + 1) cycles,
  // so the register covers 1 to 256 cycles.
  localparam int unsigned DHIGH_W = 8;

  // Process model of one signal path (latch D->Q plus inverter), in fs.
  localparam int unsigned T_PATH_NOM_FS = 400_000;  // 400 ps nominal
  localparam int unsigned T_SPREAD_FS   = 20_000;   // +/-20 ps mismatch

  // SPI commands (first byte of every transaction).
  typedef enum logic [7:0] {
    CMD_NOP         = 8'h00,
    CMD_WR_DHIGH    = 8'h01,  // next byte: Delta_HIGH - 1
    CMD_EVALUATE    = 8'h02,  // start one excitation sequence
    CMD_RD_STATUS   = 8'h03,  // reply: {6'b0, busy, valid}
    CMD_RD_RESPONSE = 8'h04,  // reply: response, bit N_BITS-1 first
    CMD_RD_DHIGH    = 8'h05   // reply: Delta_HIGH - 1
  } spi_cmd_e;

  // Phases of the excitation sequence.
  typedef enum logic [2:0] {
    ST_IDLE,    // RESET = 0, START = 0
    ST_INIT,    // initialization phase: RESET = 1
    ST_REST,    // RESET released, cells left to settle
    ST_EVAL,    // evaluation phase: START = 1 for Delta_HIGH cycles
    ST_OUTPUT   // output phase: START = 0, response captured
  } fsm_state_e;

  // 32-bit integer mixing function (xor-shift / multiply avalanche).
  function automatic int unsigned mix32(input int unsigned x);
    int unsigned h;
    h = x;
    h = h ^ (h >> 16);
    h = h * 32'h7feb352d;
    h = h ^ (h >> 15);
    h = h * 32'h846ca68b;
    h = h ^ (h >> 16);
    return h;
  endfunction

  // Delay in fs of path `path` (0 = P1, 1 = P2) of cell `cell_idx` on the chip
  // identified by `seed`: uniform in T_PATH_NOM_FS +/- T_SPREAD_FS.
  function automatic int path_delay_fs(input int unsigned seed,
                                       input int unsigned cell_idx,
                                       input int unsigned path);
    int unsigned h;
    h = mix32((seed * 32'h9e3779b9) ^ mix32(cell_idx * 2 + path + 1));
    return int'(T_PATH_NOM_FS - T_SPREAD_FS + (h % (2 * T_SPREAD_FS + 1)));
  endfunction
endpackage
