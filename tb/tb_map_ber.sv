// tb_map_ber: bit-error-rate workload of one log-MAP decoder at its default
// size (N = 5, 14-bit words, terminated trellis) over an AWGN channel.
//
// For each Eb/N0 of 1..6 dB the testbench sends BLOCKS blocks. A block holds
// 3 random data bits followed by 2 tail bits that return the encoder to
// state 00, so the decoder may assume the terminated end. The 10 code bits
// are BPSK-mapped (1 -> +1, 0 -> -1), Gaussian noise of variance
// sigma^2 = 1/K is added, the samples are scaled by 10, rounded and
// clipped, and the block is decoded with K given to the decoder (10
// fractional bits). No a priori information is used.
//
// The K values per Eb/N0 are those of the original decoder's error-rate
// study (1.2590 ... 3.9809, i.e. K = 10^(Eb/N0 / 10) for a rate-1/2 code).
// Errors are counted over all 5 decided bits of each block.
//
// A second decoder with 11-bit words (W = 11, clip level +/-800, the
// original study's "r = 11" case) decodes the same samples, clipped to
// its range, next to the default 14-bit one.
//
// Checks:
//  - every block's decisions, in both decoders, agree with the integer
//    reference model;
//  - every block takes exactly 3N+8 edges;
//  - the error count does not rise from one Eb/N0 to the next;
//  - at every Eb/N0 the decoder makes fewer errors than hard decisions on
//    the same noisy data samples (coding gain).
// The published hardware results for 14-bit words are printed next to the
// measured ones for comparison only: the block length and tail handling
// behind them are not stated, and they lie between this terminated 5-bit
// block and an open 5-bit block.
`timescale 1ns/1ps
module tb_map_ber;
  import cpc_pkg::*;
  import cpc_ref_pkg::*;

  localparam int N      = 5;
  localparam int W      = 14;
  localparam int SAT    = 8000;
  localparam int BLOCKS = 10000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic                 start;
  logic [KW-1:0]        k;
  logic signed [W-1:0]  y   [2*N];
  logic signed [W-1:0]  apr [N];
  logic                 busy, done;
  logic signed [W-1:0]  ll  [N];
  logic signed [W-1:0]  llp [N];
  logic [N-1:0]         dd, dp;

  localparam int W11   = 11;
  localparam int SAT11 = 800;
  logic signed [W11-1:0] y11   [2*N];
  logic signed [W11-1:0] apr11 [N];
  logic                  busy11, done11;
  logic signed [W11-1:0] ll11  [N];
  logic signed [W11-1:0] llp11 [N];
  logic [N-1:0]          dd11, dp11;

  map_decoder dut (
    .clk, .rst, .start, .k, .y, .apr,
    .busy, .done, .ll, .llp, .dec_dat(dd), .dec_par(dp)
  );

  map_decoder #(.W(W11), .SAT(SAT11)) dut11 (
    .clk, .rst, .start, .k, .y(y11), .apr(apr11),
    .busy(busy11), .done(done11), .ll(ll11), .llp(llp11), .dec_dat(dd11), .dec_par(dp11)
  );

  // watchdog
  initial begin
    repeat (6 * BLOCKS * (3*N + 12) + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endfunction

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1, 1000000))) / 1000000.0;
    u2 = (real'($urandom_range(0, 1000000))) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307 * u2);
  endfunction

  function automatic int q10(real v);
    int r;
    r = $rtoi(v * 10.0 + ((v >= 0.0) ? 0.5 : -0.5));
    if (r > SAT) r = SAT;
    if (r < -SAT) r = -SAT;
    return r;
  endfunction

  real kdb   [6] = '{1.2590, 1.5848, 1.9952, 2.5119, 3.1626, 3.9809};
  real paper   [6] = '{-1.328, -1.863, -2.197, -3.225, -3.435, -4.417};
  real paper11 [6] = '{-1.309, -1.838, -2.105, -3.078, -3.271, -4.204};

  initial begin
    bit   d [], c [];
    int   yv [], av [], rl [], rlp [];
    bit   rd [], rp [];
    int   errs [6];
    int   raw  [6];
    int   errs11 [6];
    int   yv11 [];
    real  ber  [6];

    start = 1'b0; k = '0;
    foreach (y[i]) y[i] = '0;
    foreach (apr[i]) apr[i] = '0;
    foreach (y11[i]) y11[i] = '0;
    foreach (apr11[i]) apr11[i] = '0;
    yv11 = new[2*N];
    d = new[N]; yv = new[2*N]; av = new[N];
    foreach (av[i]) av[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    for (int e = 0; e < 6; e++) begin
      int   kv, st;
      real  sd;
      kv = $rtoi(kdb[e] * 1024.0 + 0.5);
      sd = $sqrt(1.0 / kdb[e]);
      errs[e] = 0;
      raw[e]  = 0;
      errs11[e] = 0;
      for (int b = 0; b < BLOCKS; b++) begin
        int lat;
        // 3 data bits, then 2 tail bits that bring the state to 00
        st = 0;
        for (int i = 0; i < N; i++) begin
          if (i < N - 2) d[i] = 1'($urandom_range(0, 1));
          else           d[i] = 1'(((st >> 1) ^ st) & 1);
          st = nxt(st, int'(d[i]));
        end
        rsc_encode(N, d, c);
        foreach (yv[i]) yv[i] = q10((c[i] ? 1.0 : -1.0) + sd * gauss());

        @(negedge clk);
        foreach (y[i]) y[i] = W'(yv[i]);
        foreach (yv11[i]) yv11[i] = clip(yv[i], SAT11);
        foreach (y11[i]) y11[i] = W11'(yv11[i]);
        k = KW'(kv);
        start = 1'b1;
        @(negedge clk);
        start = 1'b0;
        lat = 1;
        while (!done) begin
          @(negedge clk);
          lat++;
        end
        if (lat != 3*N + 8) check(1'b0, $sformatf("latency %0d", lat));
        else checks++;

        map_decode(N, W, SAT, 1'b1, kv, yv, av, rl, rlp, rd, rp);
        for (int i = 0; i < N; i++) begin
          check(dd[i] === 1'(rd[i]), $sformatf("Eb/N0 %0d dB block %0d bit %0d", e + 1, b, i));
          if (dd[i] !== d[i]) errs[e]++;
          if ((yv[2*i] > 0) != d[i]) raw[e]++;
        end
        check(done11 === 1'b1, "11-bit decoder not in step");
        map_decode(N, W11, SAT11, 1'b1, kv, yv11, av, rl, rlp, rd, rp);
        for (int i = 0; i < N; i++) begin
          check(dd11[i] === 1'(rd[i]), $sformatf("11-bit: Eb/N0 %0d dB block %0d bit %0d", e + 1, b, i));
          if (dd11[i] !== d[i]) errs11[e]++;
        end
      end
      ber[e] = real'(errs[e]) / real'(N * BLOCKS);
      $display("Eb/N0 %0d dB: %0d errors in %0d bits (%0d before decoding), log10(BER) = %0.3f (published %0.3f)",
               e + 1, errs[e], N * BLOCKS, raw[e],
               (errs[e] > 0) ? $log10(ber[e]) : -99.0, paper[e]);
      $display("        11-bit words: %0d errors, log10(BER) = %0.3f (published %0.3f)",
               errs11[e], (errs11[e] > 0) ? $log10(real'(errs11[e]) / real'(N * BLOCKS)) : -99.0, paper11[e]);
    end

    for (int e = 0; e < 6; e++) begin
      if (e > 0) check(errs[e] <= errs[e-1], $sformatf("BER rising at %0d dB", e + 1));
      check(errs[e] < raw[e], $sformatf("no coding gain at %0d dB: %0d vs %0d", e + 1, errs[e], raw[e]));
      check(errs11[e] < raw[e], $sformatf("11-bit: no coding gain at %0d dB", e + 1));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
