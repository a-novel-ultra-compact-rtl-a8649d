// tb_spi_slave: self-checking testbench of the SPI host interface.
//
// A mode-0 SPI master (tb_spi_master, SCK = 5 MHz against a 50 MHz system
// clock) issues every command: reads the Delta_HIGH reset value, writes and
// reads it back, sends EVALUATE and counts the one-cycle eval_go pulses,
// reads the status byte for different busy/valid inputs, and reads a random
// 128-bit response byte by byte, most significant byte first, plus one
// byte past the end, which must be 0. MISO must be 0 while CS is high.
module tb_spi_slave;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N = 128;

  logic         clk = 1'b0;
  logic         rst_n = 1'b1;
  logic         sck, mosi, cs_n, miso;
  logic [7:0]   dhigh;
  logic         eval_go;
  logic         busy = 1'b0;
  logic         valid = 1'b0;
  logic [N-1:0] response = '0;
  int           checks = 0;
  int           failures = 0;
  int           go_pulses = 0;
  int           go_len = 0;
  int           go_len_max = 0;

  always #10 clk = !clk;

  spi_slave #(.N(N)) dut (
    .clk, .rst_n, .sck, .mosi, .cs_n, .miso, .dhigh, .eval_go, .busy, .valid, .response
  );
  tb_spi_master #(.HALF_NS(100.0)) master (.sck, .mosi, .cs_n, .miso);

  always @(posedge clk) begin
    if (eval_go) begin
      go_len++;
      if (go_len == 1) go_pulses++;
      if (go_len > go_len_max) go_len_max = go_len;
    end else begin
      go_len = 0;
    end
  end

  task automatic check_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned tx[], rx[];
    logic [N-1:0] r;
    #1 rst_n = 1'b0;
    #100 rst_n = 1'b1;
    #100;
    check_eq("miso idle", miso, 0);
    // Delta_HIGH reset value.
    tx = '{8'h05, 8'h00};
    master.xfer(tx, rx);
    check_eq("RD_DHIGH reset", rx[1], 8'hff);
    check_eq("dhigh reset", dhigh, 8'hff);
    // Write and read back.
    tx = '{8'h01, 8'h13};
    master.xfer(tx, rx);
    check_eq("dhigh written", dhigh, 8'h13);
    tx = '{8'h05, 8'h00};
    master.xfer(tx, rx);
    check_eq("RD_DHIGH", rx[1], 8'h13);
    check_eq("cmd byte reply", rx[0], 8'h00);
    // EVALUATE: exactly one single-cycle pulse.
    tx = '{8'h02};
    master.xfer(tx, rx);
    check_eq("eval_go pulses", go_pulses, 1);
    check_eq("eval_go width", go_len_max, 1);
    check_eq("dhigh kept", dhigh, 8'h13);
    // Status.
    busy = 1'b1; valid = 1'b0;
    tx = '{8'h03, 8'h00, 8'h00};
    master.xfer(tx, rx);
    check_eq("status busy", rx[1], 8'h02);
    check_eq("status busy again", rx[2], 8'h02);
    busy = 1'b0; valid = 1'b1;
    master.xfer(tx, rx);
    check_eq("status valid", rx[1], 8'h01);
    // Response read-out, twice with different data.
    for (int t = 0; t < 2; t++) begin
      r = {$urandom, $urandom, $urandom, $urandom};
      response = r;
      tx = new[N / 8 + 2];
      tx[0] = 8'h04;
      master.xfer(tx, rx);
      for (int k = 0; k < N / 8; k++)
        check_eq($sformatf("response byte %0d", k), rx[k + 1], r[N-1-8*k -: 8]);
      check_eq("byte past end", rx[N / 8 + 1], 8'h00);
    end
    // Unknown command: nothing changes, replies 0.
    tx = '{8'h7e, 8'h55};
    master.xfer(tx, rx);
    check_eq("unknown cmd reply", rx[1], 8'h00);
    check_eq("unknown cmd dhigh", dhigh, 8'h13);
    check_eq("eval_go pulses end", go_pulses, 1);
    check_eq("miso idle end", miso, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
