// tb_dd_puf_macro: self-checking testbench of the two-bit DD-PUF macro.
//
// Cell A is given the slower path P1 (settles to 1) and cell B the slower
// path P2 (settles to 0); a second pass swaps the roles through a second
// macro instance. Both cells share RESET and START, so one excitation
// sequence must produce both bits at once. Checks: both outputs 1 during
// RESET, the expected two-bit value after a long evaluation phase, values
// held after START falls, and the same value again on a second read-out.
module tb_dd_puf_macro;
  timeunit 1ns;
  timeprecision 1ps;

  logic       reset = 1'b0;
  logic       start = 1'b0;
  logic [1:0] out_x, out_y;
  int         checks = 0;
  int         failures = 0;

  dd_puf_macro #(
    .T_P1_A_FS(410_000), .T_P2_A_FS(400_000),
    .T_P1_B_FS(396_000), .T_P2_B_FS(401_000)
  ) u_x (.reset, .start, .out(out_x));

  dd_puf_macro #(
    .T_P1_A_FS(390_000), .T_P2_A_FS(403_000),
    .T_P1_B_FS(402_000), .T_P2_B_FS(399_000)
  ) u_y (.reset, .start, .out(out_y));

  task automatic check(input string what, input logic [1:0] got, input logic [1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  task automatic readout(input int n);
    logic [1:0] sx, sy;
    reset = 1'b1;
    #20;
    check($sformatf("reset x %0d", n), out_x, 2'b11);
    check($sformatf("reset y %0d", n), out_y, 2'b11);
    reset = 1'b0;
    #20;
    start = 1'b1;
    #500;
    start = 1'b0;
    #5;
    check($sformatf("x %0d", n), out_x, 2'b01);
    check($sformatf("y %0d", n), out_y, 2'b10);
    sx = out_x;
    sy = out_y;
    #300;
    check($sformatf("hold x %0d", n), out_x, sx);
    check($sformatf("hold y %0d", n), out_y, sy);
  endtask

  initial begin
    #100_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5;
    readout(0);
    readout(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
