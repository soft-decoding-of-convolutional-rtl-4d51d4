// tb_cpc_ber: bit-error-rate workload of the whole codec at its default size
// (N = 5: 5x5 data, 10x10 codeword, 14-bit words) with 12 decoding
// iterations, over an AWGN channel at Eb/N0 = 1..6 dB.
//
// Each block is a random 5x5 data matrix. It is encoded by the codec's own
// product encoder, BPSK-mapped (1 -> +1, 0 -> -1), given Gaussian noise of
// variance sigma^2 = 1/K, scaled by 10, rounded, clipped to +/-8000, written
// into the decoder's RAM and decoded with 12 iterations. The code rate is
// 25/100, so K = 2 * (1/4) * 10^(Eb/N0 / 10) = 0.5 * 10^(Eb/N0 / 10).
//
// Checks:
//  - the encoder output equals the reference encoder's codeword;
//  - every block runs exactly 12 iterations and finishes 1 + 4N^2 +
//    12(6N+18) edges after the start edge;
//  - at every Eb/N0 the data errors after 12 iterations are fewer than the
//    hard-decision errors of the raw data samples, and no more than after
//    the first iteration;
//  - the error count after 12 iterations does not rise from one Eb/N0 to
//    the next.
// The original design's error-rate study used a 20x20 codeword carrying 8x8
// data (rate 64/400) with 12 iterations; its results are printed next to
// the measured ones for comparison only, as the block size here differs.
`timescale 1ns/1ps
module tb_cpc_ber;
  import cpc_pkg::*;
  import cpc_ref_pkg::*;

  localparam int N      = 5;
  localparam int W      = 14;
  localparam int SAT    = 8000;
  localparam int AW     = $clog2(4*N*N);
  localparam int ITERS  = 12;
  localparam int BLOCKS = 300;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic                 ram_we;
  logic [AW-1:0]        ram_addr;
  logic signed [W-1:0]  ram_din;
  logic                 start;
  logic [7:0]           iters;
  logic [KW-1:0]        k_chan;
  logic                 busy, iter_done, done;
  logic signed [W-1:0]  o_r [N][2*N];
  logic [N-1:0]         dec_data [N];

  logic                 enc_start, enc_busy, enc_done;
  logic [N-1:0]         enc_data [N];
  logic [2*N-1:0]       enc_code [2*N];

  cpc_top top (
    .clk, .rst,
    .enc_start, .enc_data, .enc_busy, .enc_done, .enc_code,
    .ram_we, .ram_addr, .ram_din, .dec_start(start), .dec_iters(iters), .dec_k(k_chan),
    .dec_busy(busy), .dec_iter_done(iter_done), .dec_done(done),
    .dec_o_r(o_r), .dec_data(dec_data)
  );

  int checks = 0;
  int failures = 0;

  initial begin : watchdog
    repeat (6 * BLOCKS * (4*N*N + ITERS*(6*N + 18) + 4*N*N + 4*N + 50) + 1000) @(posedge clk);
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

  real paper [6] = '{-1.445, -2.123, -2.845, -3.714, -4.661, -5.653};

  initial begin
    bit  d [], code [], ref_code [];
    int  yc [];
    int  errs1 [6], errs [6], raw [6];

    ram_we = 0; ram_addr = '0; ram_din = '0; start = 0; iters = '0; k_chan = '0;
    enc_start = 0;
    foreach (enc_data[i]) enc_data[i] = '0;
    d = new[N*N]; code = new[4*N*N]; yc = new[4*N*N];
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    for (int e = 0; e < 6; e++) begin
      real kr, sd;
      int  kv;
      kr = 0.5 * (10.0 ** (real'(e + 1) / 10.0));
      kv = $rtoi(kr * 1024.0 + 0.5);
      sd = $sqrt(1.0 / kr);
      errs1[e] = 0; errs[e] = 0; raw[e] = 0;
      for (int b = 0; b < BLOCKS; b++) begin
        int lat, it;
        // encode with the codec's encoder
        foreach (d[i]) d[i] = 1'($urandom_range(0, 1));
        for (int r = 0; r < N; r++)
          for (int c = 0; c < N; c++) enc_data[r][c] = d[r*N + c];
        @(negedge clk) enc_start = 1'b1;
        @(negedge clk) enc_start = 1'b0;
        while (!enc_done) @(negedge clk);
        for (int r = 0; r < 2*N; r++)
          for (int c = 0; c < 2*N; c++) code[r*2*N + c] = enc_code[r][c];
        product_encode(N, d, ref_code);
        begin
          bit same;
          same = 1'b1;
          foreach (code[i]) if (code[i] !== ref_code[i]) same = 1'b0;
          check(same, $sformatf("encoder, Eb/N0 %0d dB block %0d", e + 1, b));
        end

        // channel and RAM load
        foreach (yc[i]) yc[i] = q10((code[i] ? 1.0 : -1.0) + sd * gauss());
        for (int r = 0; r < N; r++)
          for (int c = 0; c < N; c++)
            if ((yc[(2*r)*2*N + 2*c] > 0) != d[r*N + c]) raw[e]++;
        for (int i = 0; i < 4*N*N; i++) begin
          @(negedge clk);
          ram_we = 1'b1; ram_addr = AW'(i); ram_din = W'(yc[i]);
        end
        @(negedge clk) ram_we = 1'b0;

        // decode
        iters = 8'(ITERS); k_chan = KW'(kv);
        @(negedge clk) start = 1'b1;
        @(posedge clk); lat = 1;
        @(negedge clk) start = 1'b0;
        it = 0;
        while (!done) begin
          @(posedge clk); lat++;
          if (iter_done) begin
            it++;
            if (it == 1)
              for (int r = 0; r < N; r++)
                for (int c = 0; c < N; c++)
                  if (dec_data[r][c] != d[r*N + c]) errs1[e]++;
          end
        end
        lat--;
        check(lat == 1 + 4*N*N + ITERS * (6*N + 18), $sformatf("latency %0d", lat));
        check(it == ITERS, $sformatf("iterations %0d", it));
        for (int r = 0; r < N; r++)
          for (int c = 0; c < N; c++)
            if (dec_data[r][c] != d[r*N + c]) errs[e]++;
      end
      $display("Eb/N0 %0d dB: raw %0d, after 1 iteration %0d, after %0d iterations %0d errors in %0d bits; log10(BER) = %0.3f (published, 20x20 code: %0.3f)",
               e + 1, raw[e], errs1[e], ITERS, errs[e], N * N * BLOCKS,
               (errs[e] > 0) ? $log10(real'(errs[e]) / real'(N * N * BLOCKS)) : -99.0, paper[e]);
    end

    for (int e = 0; e < 6; e++) begin
      check(errs[e] < raw[e], $sformatf("no coding gain at %0d dB", e + 1));
      check(errs[e] <= errs1[e], $sformatf("iterations made it worse at %0d dB", e + 1));
      if (e > 0) check(errs[e] <= errs[e-1], $sformatf("BER rising at %0d dB", e + 1));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
