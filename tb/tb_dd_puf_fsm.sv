// tb_dd_puf_fsm: self-checking testbench of the excitation controller.
//
// For several Delta_HIGH settings (1, 20, 129 and 256 cycles) the testbench
// starts a read-out and measures, cycle by cycle, how long RESET and START
// are high, the gap between them, and the latency from `go` to `valid`.
// It also checks that RESET and START never overlap, that busy/valid behave
// as documented, that a `go` during a read-out is ignored, and that the
// response captured is the value on puf_out after START has fallen (the
// testbench changes puf_out while START is high, so a too-early capture
// would be seen).
module tb_dd_puf_fsm;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N    = 128;
  localparam int unsigned INIT = 3;
  localparam int unsigned REST = 5;
  localparam int unsigned OUTC = 2;

  logic         clk = 1'b0;
  logic         rst_n = 1'b1;
  logic         go = 1'b0;
  logic [7:0]   dhigh = 8'd0;
  logic         puf_reset, puf_start, busy, valid;
  logic [N-1:0] puf_out = '0;
  logic [N-1:0] response;
  int           checks = 0;
  int           failures = 0;

  always #10 clk = !clk;  // 50 MHz

  dd_puf_fsm #(.N(N), .INIT_CYCLES(INIT), .REST_CYCLES(REST), .OUT_CYCLES(OUTC)) dut (
    .clk, .rst_n, .go, .dhigh, .puf_reset, .puf_start, .puf_out, .response, .busy, .valid
  );

  task automatic check_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Counts per read-out, sampled at each rising edge.
  int reset_cycles, start_cycles, gap_cycles, total_cycles, overlap;

  task automatic readout(input int unsigned dh_cycles);
    logic [N-1:0] final_val;
    bit seen_start, seen_reset_end;
    final_val = {$urandom, $urandom, $urandom, $urandom};
    dhigh = 8'(dh_cycles - 1);
    @(negedge clk);
    go = 1'b1;
    @(negedge clk);
    go = 1'b0;
    check_eq("busy after go", busy, 1);
    check_eq("valid cleared", valid, 0);
    reset_cycles = 0; start_cycles = 0; gap_cycles = 0; total_cycles = 1; overlap = 0;
    seen_start = 0; seen_reset_end = 0;
    while (!valid) begin
      if (puf_reset) reset_cycles++;
      if (puf_start) start_cycles++;
      if (puf_reset && puf_start) overlap++;
      if (!puf_reset && !puf_start && reset_cycles > 0 && start_cycles == 0) gap_cycles++;
      // Change the array output while START is high; settle it after.
      if (puf_start) puf_out = {$urandom, $urandom, $urandom, $urandom};
      else if (start_cycles > 0) puf_out = final_val;
      if (start_cycles == 1 && !seen_start) begin
        seen_start = 1;
        // A second go during the sequence must be ignored.
        go = 1'b1;
      end else begin
        go = 1'b0;
      end
      @(negedge clk);
      total_cycles++;
    end
    go = 1'b0;
    check_eq($sformatf("RESET cycles (dh=%0d)", dh_cycles), reset_cycles, INIT);
    check_eq($sformatf("rest cycles (dh=%0d)", dh_cycles), gap_cycles, REST);
    check_eq($sformatf("START cycles (dh=%0d)", dh_cycles), start_cycles, dh_cycles);
    check_eq($sformatf("overlap (dh=%0d)", dh_cycles), overlap, 0);
    check_eq($sformatf("latency (dh=%0d)", dh_cycles), total_cycles,
             INIT + REST + dh_cycles + OUTC + 1);
    check_eq("response", (response == final_val), 1);
    check_eq("busy low at end", busy, 0);
    // Response holds while idle.
    repeat (5) @(negedge clk);
    check_eq("response held", (response == final_val), 1);
    check_eq("valid held", valid, 1);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;  // a real falling edge for the asynchronous reset
    repeat (3) @(negedge clk);
    check_eq("idle RESET", puf_reset, 0);
    check_eq("idle START", puf_start, 0);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    check_eq("idle busy", busy, 0);
    readout(1);
    readout(20);
    readout(129);
    readout(256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
