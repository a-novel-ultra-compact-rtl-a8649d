// dd_puf_fsm: excitation controller of the DD-PUF array.
//
// A read-out of the PUF is a fixed sequence of three phases, started by a
// one-cycle pulse on `go`:
//
//   1. Initialization: RESET = 1 for INIT_CYCLES cycles (START = 0), which
//      clears every latch of the array; RESET then returns to 0 and the
//      cells are left to settle for REST_CYCLES cycles.
//   2. Evaluation: START = 1 for exactly dhigh + 1 cycles (Delta_HIGH, 1 to
//      256 cycles). The latches are transparent and every cell oscillates
//      and then settles to its bit.
//   3. Output: START returns to 0, the latches hold, and after OUT_CYCLES
//      cycles the whole response is copied into the `response` register
//      and `valid` is raised.
//
// RESET and START come straight from flip-flops so the array sees clean,
// glitch-free control edges, and they are never high together. `busy` is
// high from the cycle after `go` until the cycle the response is stored;
// `valid` is cleared when a new sequence starts. A `go` while busy is
// ignored. Timing: the first RESET cycle follows `go` by one cycle, and a
// complete read-out takes INIT_CYCLES + REST_CYCLES + dhigh + 1 +
// OUT_CYCLES + 1 cycles from `go` to `valid`.
//
// The phase order and the use of a clock-cycle count for Delta_HIGH follow
// the published design. The lengths of the reset, rest and output phases
// are not given there and are this design's own defaults.
module dd_puf_fsm
  import dd_puf_pkg::*;
#(
  parameter int unsigned N          = N_BITS,  // response width
  parameter int unsigned INIT_CYCLES = 4,      // RESET pulse length
  parameter int unsigned REST_CYCLES = 4,      // settle time after RESET
  parameter int unsigned OUT_CYCLES  = 2       // hold time before capture
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               go,        // start one read-out (pulse)
  input  logic [DHIGH_W-1:0] dhigh,     // Delta_HIGH - 1, in cycles
  output logic               puf_reset, // to the array's RESET
  output logic               puf_start, // to the array's START
  input  logic [N-1:0]       puf_out,   // from the array
  output logic [N-1:0]       response,  // captured response
  output logic               busy,
  output logic               valid
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned CNT_W = 9;  // holds up to 256 cycles

  fsm_state_e        state;
  logic [CNT_W-1:0]  cnt;  // cycles left in the current phase, minus one

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      cnt       <= '0;
      puf_reset <= 1'b0;
      puf_start <= 1'b0;
      response  <= '0;
      valid     <= 1'b0;
    end else begin
      unique case (state)
        ST_IDLE: begin
          if (go) begin
            state     <= ST_INIT;
            cnt       <= CNT_W'(INIT_CYCLES - 1);
            puf_reset <= 1'b1;
            valid     <= 1'b0;
          end
        end
        ST_INIT: begin
          if (cnt == 0) begin
            state     <= ST_REST;
            cnt       <= CNT_W'(REST_CYCLES - 1);
            puf_reset <= 1'b0;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        ST_REST: begin
          if (cnt == 0) begin
            state     <= ST_EVAL;
            cnt       <= CNT_W'(dhigh);
            puf_start <= 1'b1;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        ST_EVAL: begin
          if (cnt == 0) begin
            state     <= ST_OUTPUT;
            cnt       <= CNT_W'(OUT_CYCLES - 1);
            puf_start <= 1'b0;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        ST_OUTPUT: begin
          if (cnt == 0) begin
            state    <= ST_IDLE;
            response <= puf_out;
            valid    <= 1'b1;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign busy = (state != ST_IDLE);

  // RESET and START of the array must never be active together.
  a_ctrl_exclusive: assert property (@(posedge clk)
                                     !(puf_reset && puf_start));

  // Phase lengths must be at least one cycle.
  initial begin
    assert (INIT_CYCLES >= 1 && REST_CYCLES >= 1 && OUT_CYCLES >= 1)
      else $error("dd_puf_fsm: phase lengths must be at least 1");
  end
endmodule
