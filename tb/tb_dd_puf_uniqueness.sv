// tb_dd_puf_uniqueness: sixteen chips, uniqueness and uniformity.
//
// Sixteen 128-bit arrays with DEVICE_SEED 1..16 stand for the same design on
// sixteen chips. All are excited once with a 256-cycle evaluation phase
// (20 ns cycles). Every response bit is compared with the process model
// written out here. The testbench then computes the figures used to judge a
// PUF:
//   uniqueness  mean pairwise Hamming distance over all 120 chip pairs,
//               2/(k(k-1)) * sum HD(Ri, Rj)/n, ideally 50 %;
//   uniformity  fraction of ones over all chips, ideally 50 %;
//   bit bias    fraction of chips giving 1 at each bit position; a bit
//               that is 1 (or 0) on every chip would be a "dark bit".
// It requires uniqueness and uniformity between 40 % and 60 %, and no bit
// position to be identical on all sixteen chips.
module tb_dd_puf_uniqueness;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N = 128;
  localparam int unsigned K = 16;

  logic         reset = 1'b0;
  logic         start = 1'b0;
  logic [N-1:0] resp [K];
  int           checks = 0;
  int           failures = 0;

  for (genvar d = 0; d < K; d++) begin : g_chip
    dd_puf_array #(.ROWS(8), .COLS(8), .DEVICE_SEED(d + 1)) u_array (
      .reset, .start, .response(resp[d])
    );
  end

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
  function automatic int expect_bit(input int unsigned seed, input int unsigned idx,
                                    input longint dur_ps);
    longint p1, p2, half_ps, dd, add, settle, n;
    p1      = delay_fs(seed, idx, 0);
    p2      = delay_fs(seed, idx, 1);
    half_ps = (p1 + p2) / 2000;
    dd      = p1 - p2;
    add     = (dd < 0) ? -dd : dd;
    settle  = (add == 0) ? 0 : ((p1 + p2) / 2 + add - 1) / add;
    n       = dur_ps / half_ps;
    if (settle != 0 && n >= settle) return (dd > 0) ? 1 : 0;
    if (dur_ps % half_ps == 0) return 2;
    return ((n % 2) == 0) ? 1 : 0;
  endfunction

  initial begin
    #100_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint hd_sum, ones;
    int hd, hd_min, hd_max, dark, col;
    int e;
    #5;
    reset = 1'b1;
    #80;
    reset = 1'b0;
    #80;
    start = 1'b1;
    #(256 * 20);
    start = 1'b0;
    #40;
    // Every bit against the model.
    for (int d = 0; d < K; d++)
      for (int unsigned i = 0; i < N; i++) begin
        e = expect_bit(d + 1, i, 256 * 20_000);
        checks++;
        if (e != 2 && resp[d][i] !== e[0]) begin
          failures++;
          $display("FAIL chip %0d bit %0d: got %0b expected %0d", d + 1, i, resp[d][i], e);
        end
      end
    // Uniqueness.
    hd_sum = 0; hd_min = N; hd_max = 0;
    for (int i = 0; i < K - 1; i++)
      for (int j = i + 1; j < K; j++) begin
        hd = $countones(resp[i] ^ resp[j]);
        hd_sum += hd;
        if (hd < hd_min) hd_min = hd;
        if (hd > hd_max) hd_max = hd;
      end
    // Uniformity and bit bias.
    ones = 0;
    for (int d = 0; d < K; d++) ones += $countones(resp[d]);
    dark = 0;
    for (int unsigned i = 0; i < N; i++) begin
      col = 0;
      for (int d = 0; d < K; d++) col += int'(resp[d][i]);
      if (col == 0 || col == K) dark++;
    end
    $display("uniqueness: mean HD %0d.%02d %% (min %0d, max %0d of %0d bits, %0d pairs)",
             hd_sum * 100 / (N * K * (K - 1) / 2), (hd_sum * 10000 / (N * K * (K - 1) / 2)) % 100,
             hd_min, hd_max, N, K * (K - 1) / 2);
    $display("uniformity: %0d.%02d %% ones; bit positions equal on all chips: %0d",
             ones * 100 / (N * K), (ones * 10000 / (N * K)) % 100, dark);
    checks++;
    if (hd_sum * 100 < 40 * (N * K * (K - 1) / 2) || hd_sum * 100 > 60 * (N * K * (K - 1) / 2)) begin
      failures++;
      $display("FAIL uniqueness out of range");
    end
    checks++;
    if (ones * 100 < 40 * N * K || ones * 100 > 60 * N * K) begin
      failures++;
      $display("FAIL uniformity out of range");
    end
    checks++;
    if (dark != 0) begin
      failures++;
      $display("FAIL %0d dark bits", dark);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
