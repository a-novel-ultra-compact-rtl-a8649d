// tb_dd_puf_cell: self-checking testbench of the DD-PUF bit-cell model.
//
// Four cells with different path delays share RESET and START:
//   c_pos   t_DD = +5 ps   settles to OUT = 1
//   c_neg   t_DD = -7 ps   settles to OUT = 0
//   c_eq    t_DD =  0      never settles
//   c_slow  t_DD = -0.1 ps settles only after a long evaluation phase
// After every RESET all outputs must be 1 (Q2 cleared). Evaluation phases
// of different lengths are then applied and each output is compared with
// the value expected from the sign rule OUT = (t_DD > 0) when the cell has
// had time to settle, or with the phase of the in-phase oscillation when it
// has not. The expected values are computed here from the delays alone.
module tb_dd_puf_cell;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int P1_POS = 405_000, P2_POS = 400_000;
  localparam int P1_NEG = 395_000, P2_NEG = 402_000;
  localparam int P1_EQ  = 400_000, P2_EQ  = 400_000;
  localparam int P1_SLW = 399_900, P2_SLW = 400_000;

  logic reset = 1'b0;
  logic start = 1'b0;
  logic o_pos, o_neg, o_eq, o_slw;
  int   checks = 0;
  int   failures = 0;

  dd_puf_cell #(.T_P1_FS(P1_POS), .T_P2_FS(P2_POS)) c_pos (.reset, .start, .out(o_pos));
  dd_puf_cell #(.T_P1_FS(P1_NEG), .T_P2_FS(P2_NEG)) c_neg (.reset, .start, .out(o_neg));
  dd_puf_cell #(.T_P1_FS(P1_EQ),  .T_P2_FS(P2_EQ))  c_eq  (.reset, .start, .out(o_eq));
  dd_puf_cell #(.T_P1_FS(P1_SLW), .T_P2_FS(P2_SLW)) c_slw (.reset, .start, .out(o_slw));

  // Expected OUT after an evaluation phase of dur_ps picoseconds.
  function automatic logic expect_out(input longint p1, input longint p2, input longint dur_ps);
    longint half_ps, dd, add, settle, n;
    half_ps = (p1 + p2) / 2000;
    dd      = p1 - p2;
    add     = (dd < 0) ? -dd : dd;
    settle  = (add == 0) ? 0 : ((p1 + p2) / 2 + add - 1) / add;
    n       = dur_ps / half_ps;        // half periods completed
    if (settle != 0 && n >= settle) return (dd > 0);
    return (n % 2) == 0;               // Q2 = n mod 2, OUT = !Q2
  endfunction

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  task automatic do_reset();
    reset = 1'b1;
    #10;
    check("reset pos", o_pos, 1'b1);
    check("reset neg", o_neg, 1'b1);
    check("reset eq",  o_eq,  1'b1);
    check("reset slw", o_slw, 1'b1);
    reset = 1'b0;
    #10;
  endtask

  task automatic evaluate(input longint dur_ps);
    logic s_pos, s_neg, s_eq, s_slw;
    do_reset();
    start = 1'b1;
    #(real'(dur_ps) / 1000.0);
    start = 1'b0;
    #5;
    check($sformatf("pos %0d ps", dur_ps), o_pos, expect_out(P1_POS, P2_POS, dur_ps));
    check($sformatf("neg %0d ps", dur_ps), o_neg, expect_out(P1_NEG, P2_NEG, dur_ps));
    check($sformatf("eq %0d ps",  dur_ps), o_eq,  expect_out(P1_EQ,  P2_EQ,  dur_ps));
    check($sformatf("slw %0d ps", dur_ps), o_slw, expect_out(P1_SLW, P2_SLW, dur_ps));
    // Output phase: latches closed, values must hold.
    {s_pos, s_neg, s_eq, s_slw} = {o_pos, o_neg, o_eq, o_slw};
    #200;
    check("hold", ({o_pos, o_neg, o_eq, o_slw} == {s_pos, s_neg, s_eq, s_slw}), 1'b1);
  endtask

  initial begin
    #200_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5;
    // Settled cells follow the sign rule.
    evaluate(100_500);
    // c_neg settles after 57 half periods (about 22.7 ns).
    evaluate(20_030);
    evaluate(25_030);
    // c_slow needs about 1.6 us.
    evaluate(2_000_050);
    // Repeat: identical results (the model is noise free).
    evaluate(100_500);
    // Direct sign checks after a long evaluation.
    check("sign pos", o_pos, 1'b1);
    check("sign neg", o_neg, 1'b0);
    // RESET while START is high clears the cell and stops the oscillation.
    reset = 1'b1;
    #10;
    start = 1'b1;
    #50;
    check("reset dominates", o_pos & o_neg & o_eq & o_slw, 1'b1);
    start = 1'b0;
    reset = 1'b0;
    #10;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
