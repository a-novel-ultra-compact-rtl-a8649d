// tb_dd_puf_array: self-checking testbench of the 128-bit DD-PUF array.
//
// Two arrays with different DEVICE_SEED values stand for the same design on
// two chips. Both are excited with one RESET / START sequence, first with a
// long evaluation phase (256 cycles of 20 ns) and then with a short one
// (2 cycles). Every response bit is compared with a value computed here from
// the process model: path delays uniform in 400 ps +/- 20 ps drawn from a
// hash of (seed, cell, path), bit = sign of the delay difference once the
// cell has settled, oscillation phase otherwise. The testbench also checks
// that the long read-out is repeatable, that the short one leaves some cells
// unsettled, and that the two chips differ in roughly half of their bits
// with a 1/0 balance near one half.
module tb_dd_puf_array;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned ROWS = 8;
  localparam int unsigned COLS = 8;
  localparam int unsigned N = 2 * ROWS * COLS;
  localparam int unsigned SEED_A = 1;
  localparam int unsigned SEED_B = 2;

  logic         reset = 1'b0;
  logic         start = 1'b0;
  logic [N-1:0] resp_a, resp_b;
  int           checks = 0;
  int           failures = 0;

  dd_puf_array #(.ROWS(ROWS), .COLS(COLS), .DEVICE_SEED(SEED_A)) u_a (.reset, .start, .response(resp_a));
  dd_puf_array #(.ROWS(ROWS), .COLS(COLS), .DEVICE_SEED(SEED_B)) u_b (.reset, .start, .response(resp_b));

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

  // Expected bit: 0/1, or 2 when the phase is ambiguous (a toggle coincides
  // with the falling START edge).
  function automatic int expect_bit(input int unsigned seed, input int unsigned idx,
                                    input longint dur_ps, output bit settled);
    longint p1, p2, half_ps, dd, add, settle, n;
    p1      = delay_fs(seed, idx, 0);
    p2      = delay_fs(seed, idx, 1);
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

  task automatic excite(input longint dur_ps);
    reset = 1'b1;
    #80;
    reset = 1'b0;
    #80;
    start = 1'b1;
    #(real'(dur_ps) / 1000.0);
    start = 1'b0;
    #40;
  endtask

  task automatic check_array(input string what, input int unsigned seed,
                             input logic [N-1:0] got, input longint dur_ps,
                             output int unsettled);
    int e;
    bit s;
    unsettled = 0;
    for (int unsigned i = 0; i < N; i++) begin
      e = expect_bit(seed, i, dur_ps, s);
      if (!s) unsettled++;
      checks++;
      if (e != 2 && got[i] !== e[0]) begin
        failures++;
        $display("FAIL %s bit %0d: got %0b expected %0d", what, i, got[i], e);
      end
    end
  endtask

  initial begin
    #100_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] gk_a, gk_b;
    int un_a, un_b, hd, ones;
    #5;
    // Long evaluation phase: 256 cycles of 20 ns.
    excite(256 * 20_000);
    check_array("long A", SEED_A, resp_a, 256 * 20_000, un_a);
    check_array("long B", SEED_B, resp_b, 256 * 20_000, un_b);
    gk_a = resp_a;
    gk_b = resp_b;
    $display("long phase: unsettled cells A=%0d B=%0d", un_a, un_b);
    // Repeat: identical response.
    excite(256 * 20_000);
    checks++;
    if (resp_a !== gk_a || resp_b !== gk_b) begin
      failures++;
      $display("FAIL repeated read-out differs");
    end
    // Short evaluation phase: 2 cycles.
    excite(2 * 20_000);
    check_array("short A", SEED_A, resp_a, 2 * 20_000, un_a);
    check_array("short B", SEED_B, resp_b, 2 * 20_000, un_b);
    $display("short phase: unsettled cells A=%0d B=%0d", un_a, un_b);
    checks++;
    if (un_a + un_b == 0) begin
      failures++;
      $display("FAIL short phase left no cell unsettled");
    end
    // Uniqueness and uniformity of the long-phase responses.
    hd   = $countones(gk_a ^ gk_b);
    ones = $countones(gk_a) + $countones(gk_b);
    $display("inter-chip HD = %0d of %0d bits, ones = %0d of %0d", hd, N, ones, 2 * N);
    checks++;
    if (hd < N * 3 / 10 || hd > N * 7 / 10) begin
      failures++;
      $display("FAIL inter-chip Hamming distance %0d out of range", hd);
    end
    checks++;
    if (ones < 2 * N * 3 / 10 || ones > 2 * N * 7 / 10) begin
      failures++;
      $display("FAIL bias %0d ones out of range", ones);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
