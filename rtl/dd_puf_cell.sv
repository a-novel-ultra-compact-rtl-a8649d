// dd_puf_cell: behavioural model of one Delay Difference PUF bit cell.
//
// This is a behavioural model, not synthesizable logic. The real cell is a
// hand-placed FPGA macro: two D-latches L1, L2 with asynchronous clear and
// two inverters I1, I2 (LUTs) in a loop, L1.Q -> I1 -> L2.D and
// L2.Q -> I2 -> L1.D, with OUT taken at the output of I2. Both latch gates
// are driven by START and both clears by RESET. Its function rests on
// analogue timing, which RTL cannot express, so this model reproduces the
// behaviour with delays:
//
//   * RESET = 1 clears both latches (Q1 = Q2 = 0, so OUT = 1).
//   * When START rises after reset, both latches turn transparent and both
//     nodes oscillate in phase with a half period equal to the mean path
//     delay (T_P1_FS + T_P2_FS) / 2.
//   * The loop settles to complementary values once the oscillation has
//     run for ceil(half period / |t_DD|) half periods, where
//     t_DD = T_P1_FS - T_P2_FS. The final bit is OUT = 1 when t_DD > 0 and
//     OUT = 0 when t_DD < 0 (Q1 = OUT, Q2 = ~OUT). With t_DD = 0 the cell
//     never settles.
//   * When START falls the latches hold. If the cell had not settled, the
//     captured value is the phase of the oscillation at that moment, which
//     is how a too-short evaluation phase yields unreliable bits.
//
// The sign rule and the three-phase protocol follow the published cell.
// The settling law (each round trip shortens the oscillation by |t_DD|) and
// the delay values are this model's own assumptions.
//
// Inside, the half-period delay is a token handed to a delay element
// (step_req -> step_ack), so the model needs no loop; lint tools may report
// step_req as used both as an edge and as a level, which is intended here.
//
// Ports: reset, start (both active high, idle low), out.
// Timing: out changes only while START is high or on RESET.
module dd_puf_cell #(
  parameter int T_P1_FS = 400_000,  // delay of path P1 (L1 D->Q + I1), fs
  parameter int T_P2_FS = 400_000   // delay of path P2 (L2 D->Q + I2), fs
) (
  input  logic reset,
  input  logic start,
  output logic out
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int T_DD_FS = T_P1_FS - T_P2_FS;
  localparam int ABS_DD_FS = (T_DD_FS < 0) ? -T_DD_FS : T_DD_FS;
  // Half period of the oscillation, rounded to whole picoseconds.
  localparam int HALF_PS = (T_P1_FS + T_P2_FS) / 2000;
  // Half periods until the loop settles; 0 stands for "never".
  localparam int SETTLE_HALVES =
      (ABS_DD_FS == 0) ? 0 : ((T_P1_FS + T_P2_FS) / 2 + ABS_DD_FS - 1) / ABS_DD_FS;
  // Settled value of Q1 (equal to OUT): 1 when P1 is the slower path.
  localparam logic Q1_FINAL = (T_DD_FS > 0);
  localparam realtime HALF_NS = real'(HALF_PS) / 1000.0;

  logic q1;  // output of latch L1
  logic q2;  // output of latch L2
  int unsigned halves;     // half periods oscillated since the last reset
  logic        stepping;   // a half period is in flight
  int unsigned step_req;   // token of the half period in flight
  int unsigned step_ack;   // token returned one half period later

  // Delay element: returns each token one half period after it was issued.
  always @(step_req) step_ack <= #(HALF_NS) step_req;

  // Loop state. RESET clears both latches; while START is high and the
  // nodes are still in phase, the loop toggles once per half period until
  // the settling point, where it takes its final complementary state.
  always @(reset or start or step_ack) begin
    if (reset) begin
      q1       = 1'b0;
      q2       = 1'b0;
      halves   = 0;
      stepping = 1'b0;
    end else if (!start) begin
      stepping = 1'b0;  // latches closed: the state is held
    end else begin
      if (stepping && step_ack == step_req) begin
        stepping = 1'b0;
        halves   = halves + 1;
        if (SETTLE_HALVES != 0 && halves >= SETTLE_HALVES) begin
          q1 = Q1_FINAL;
          q2 = !Q1_FINAL;
        end else begin
          q1 = !q1;
          q2 = !q2;
        end
      end
      if (!stepping && q1 == q2) begin
        stepping = 1'b1;
        step_req = step_req + 1;
      end
    end
  end

  // OUT is the output of inverter I2.
  assign out = !q2;
endmodule
