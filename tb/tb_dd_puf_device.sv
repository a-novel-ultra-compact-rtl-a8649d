// tb_dd_puf_device: end-to-end testbench of the DD-PUF device at its
// default size (128 bits, 8 x 8 macros).
//
// A mode-0 SPI master (5 MHz SCK, 50 MHz system clock) drives the device as
// a host would:
//   1. reads the Delta_HIGH register (reset value 255 = 256 cycles);
//   2. sends EVALUATE, polls the status byte until `valid`, reads the
//      128-bit response and keeps it as the golden key;
//   3. repeats the read-out and requires the same response;
//   4. sweeps Delta_HIGH over 1, 2, 4, ... 256 cycles, reading the response
//      each time and reporting its Hamming distance to the golden key.
// Every response is compared bit by bit with a value computed here from the
// process model (path delays 400 ps +/- 20 ps from a hash of chip seed,
// cell and path; the bit is the sign of the delay difference once settled,
// the oscillation phase otherwise). The length of every START pulse is
// measured in clock cycles and must equal Delta_HIGH. The testbench counts
// how often each mechanism happened (register write, evaluation, busy seen
// while polling, response read, unsettled cells captured by a short
// evaluation phase) and fails if one never happened.
module tb_dd_puf_device;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N    = 128;
  localparam int unsigned SEED = 1;   // the device's default DEVICE_SEED

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic sck, mosi, cs_n, miso;
  int   checks = 0;
  int   failures = 0;

  // Mechanism counters.
  int n_cfg_writes = 0;
  int n_evaluations = 0;
  int n_busy_seen = 0;
  int n_reads = 0;
  int n_unsettled = 0;

  always #10 clk = !clk;  // 50 MHz system clock

  dd_puf_device dut (.clk, .rst_n, .sck, .mosi, .cs_n, .miso);
  tb_spi_master #(.HALF_NS(100.0)) master (.sck, .mosi, .cs_n, .miso);

  // START pulse length, measured on the array's control input.
  int start_len = 0;
  int last_start_len = 0;
  always @(posedge clk) begin
    if (dut.u_array.start) start_len++;
    else if (start_len != 0) begin
      last_start_len = start_len;
      start_len = 0;
    end
  end

  // Process model, written out independently of the design's package.
  function automatic longint unsigned avalanche(input longint unsigned x);
    longint unsigned h;
    h = x & 64'hffff_ffff;
    h = (h ^ (h >> 16)) & 64'hffff_ffff;
    h = (h * 64'h7feb352d) & 64'hffff_ffff;
    h = (h ^ (h >> 15)) & 64'hffff_ffff;
    h = (h * 64'h846ca68b) & 64'hffff_ffff;
    h = (h ^ (h >> 16)) & 64'hffff_ffff;
    return h;
  endfunction

  function automatic longint delay_fs(input int unsigned seed, input int unsigned idx,
                                      input int unsigned path);
    longint unsigned h;
    h = avalanche(((longint'(seed) * 64'h9e3779b9) & 64'hffff_ffff)
                  ^ avalanche(longint'(idx) * 2 + path + 1));
    return 380_000 + longint'(h % 40_001);
  endfunction

  // 0/1, or 2 when a toggle coincides with the falling START edge.
  function automatic int expect_bit(input int unsigned idx, input longint dur_ps,
                                    output bit settled);
    longint p1, p2, half_ps, dd, add, settle, n;
    p1      = delay_fs(SEED, idx, 0);
    p2      = delay_fs(SEED, idx, 1);
    half_ps = (p1 + p2) / 2000;
    dd      = p1 - p2;
    add     = (dd < 0) ? -dd : dd;
    settle  = (add == 0) ? 0 : ((p1 + p2) / 2 + add - 1) / add;
    n       = dur_ps / half_ps;
    settled = (settle != 0 && n >= settle);
    if (settled) return (dd > 0) ? 1 : 0;
    if (dur_ps % half_ps == 0) return 2;
    return ((n % 2) == 0) ? 1 : 0;
  endfunction

  task automatic check_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic write_dhigh(input int unsigned cycles);
    byte unsigned tx[], rx[];
    tx = '{8'h01, 8'(cycles - 1)};
    master.xfer(tx, rx);
    n_cfg_writes++;
    tx = '{8'h05, 8'h00};
    master.xfer(tx, rx);
    check_eq("Delta_HIGH read back", rx[1], 8'(cycles - 1));
  endtask

  task automatic evaluate();
    byte unsigned tx[], rx[];
    int polls;
    tx = '{8'h02};
    master.xfer(tx, rx);
    n_evaluations++;
    polls = 0;
    tx = '{8'h03, 8'h00};
    do begin
      master.xfer(tx, rx);
      if (rx[1][1]) n_busy_seen++;
      polls++;
    end while (!rx[1][0] && polls < 100);
    check_eq("valid reached", rx[1][0], 1);
  endtask

  task automatic read_response(output logic [N-1:0] r);
    byte unsigned tx[], rx[];
    tx = new[N / 8 + 1];
    tx[0] = 8'h04;
    master.xfer(tx, rx);
    for (int k = 0; k < N / 8; k++) r[N-1-8*k -: 8] = rx[k + 1];
    n_reads++;
  endtask

  // One complete read-out with Delta_HIGH = cycles, checked against the model.
  task automatic readout(input int unsigned cycles, output logic [N-1:0] r,
                         output int unsettled);
    int e;
    bit s;
    evaluate();
    check_eq($sformatf("START length for Delta_HIGH=%0d", cycles), last_start_len, cycles);
    read_response(r);
    unsettled = 0;
    for (int unsigned i = 0; i < N; i++) begin
      e = expect_bit(i, longint'(cycles) * 20_000, s);
      if (!s) unsettled++;
      checks++;
      if (e != 2 && r[i] !== e[0]) begin
        failures++;
        $display("FAIL Delta_HIGH=%0d bit %0d: got %0b expected %0d", cycles, i, r[i], e);
      end
    end
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned tx[], rx[];
    logic [N-1:0] gk, r;
    int un, hd;
    #1 rst_n = 1'b0;
    #200 rst_n = 1'b1;
    #200;
    // 1. Reset value of Delta_HIGH.
    tx = '{8'h05, 8'h00};
    master.xfer(tx, rx);
    check_eq("Delta_HIGH reset value", rx[1], 8'hff);
    // 2. Golden key at 256 cycles.
    readout(256, gk, un);
    $display("golden key %h (%0d ones, %0d unsettled cells)", gk, $countones(gk), un);
    // 3. Repeat.
    readout(256, r, un);
    check_eq("repeated read-out equals golden key", (r == gk), 1);
    // 4. Sweep of the evaluation-phase length.
    for (int unsigned c = 1; c <= 256; c = c * 2) begin
      write_dhigh(c);
      readout(c, r, un);
      hd = $countones(r ^ gk);
      n_unsettled += un;
      $display("Delta_HIGH=%3d cycles: %3d unsettled cells, HD to golden key %3d (%0d.%02d %%)",
               c, un, hd, hd * 100 / N, (hd * 10000 / N) % 100);
    end
    // Every mechanism must have happened.
    check_eq("config writes happened", (n_cfg_writes > 0), 1);
    check_eq("evaluations happened", (n_evaluations > 0), 1);
    check_eq("busy seen while polling", (n_busy_seen > 0), 1);
    check_eq("responses read", (n_reads > 0), 1);
    check_eq("unsettled cells captured", (n_unsettled > 0), 1);
    $display("mechanisms: writes=%0d evaluations=%0d busy=%0d reads=%0d unsettled=%0d",
             n_cfg_writes, n_evaluations, n_busy_seen, n_reads, n_unsettled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
