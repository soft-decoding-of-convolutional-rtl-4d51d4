// tb_metric_recursion: checks one forward and one backward recursion step
// with normalisation. Random previous metrics (0 down to -8000) and branch
// metrics are held for three edges; norm must then equal the reference:
//   forward:  max* over the branches into m of prev(m') + BM[m'][u]
//   backward: max* over u of prev(next(m',u)) + BM[m'][u]
// minus nonterm = max* of the four results, clipped to +/-8000. The largest
// normalised value must lie in [-21, 0] (three table corrections at most).
`timescale 1ns/1ps
module tb_metric_recursion;
  import cpc_ref_pkg::*;
  localparam int W = 14;
  localparam int IW = W + 2;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic signed [W-1:0] prev [4];
  logic signed [W-1:0] bm   [8];
  logic signed [W-1:0] na   [4];
  logic signed [W-1:0] nb   [4];

  metric_recursion #(.FWD(1'b1)) u_fwd (.clk, .rst, .prev, .bm, .norm(na));
  metric_recursion #(.FWD(1'b0)) u_bwd (.clk, .rst, .prev, .bm, .norm(nb));

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (prev[i]) prev[i] = '0;
    foreach (bm[i]) bm[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int t = 0; t < 1000; t++) begin
      int pv [4], bv [8], ra [4], rb [4], c [4][2], cnt [4], nta, ntb, mxa;
      foreach (pv[i]) pv[i] = (t % 5 == 0 && i > 0) ? -8000 : -$urandom_range(0, (t % 2) ? 30 : 8000);
      foreach (bv[i]) bv[i] = $urandom_range(0, (t % 3 == 0) ? 16000 : 200) - ((t % 3 == 0) ? 8000 : 100);
      @(negedge clk);
      foreach (pv[i]) prev[i] = W'(pv[i]);
      foreach (bv[i]) bm[i] = W'(bv[i]);
      repeat (3) @(negedge clk);
      cnt = '{0, 0, 0, 0};
      for (int mp = 0; mp < 4; mp++)
        for (int u = 0; u < 2; u++) begin
          int s;
          s = nxt(mp, u);
          c[s][cnt[s]] = pv[mp] + bv[2*mp+u];
          cnt[s]++;
        end
      for (int m = 0; m < 4; m++) begin
        ra[m] = mstar(c[m][0], c[m][1], IW);
        rb[m] = mstar(pv[nxt(m, 0)] + bv[2*m], pv[nxt(m, 1)] + bv[2*m+1], IW);
      end
      nta = mstar4(ra[0], ra[1], ra[2], ra[3], IW);
      ntb = mstar4(rb[0], rb[1], rb[2], rb[3], IW);
      mxa = -100000;
      for (int m = 0; m < 4; m++) begin
        checks += 2;
        if (na[m] !== W'(clip(ra[m] - nta, 8000))) begin
          failures++;
          $display("FAIL t=%0d alpha[%0d]=%0d exp %0d", t, m, na[m], clip(ra[m] - nta, 8000));
        end
        if (nb[m] !== W'(clip(rb[m] - ntb, 8000))) begin
          failures++;
          $display("FAIL t=%0d beta[%0d]=%0d exp %0d", t, m, nb[m], clip(rb[m] - ntb, 8000));
        end
        if (int'(na[m]) > mxa) mxa = int'(na[m]);
      end
      checks++;
      if (mxa > 0 || mxa < -21) begin
        failures++;
        $display("FAIL t=%0d largest normalised alpha %0d", t, mxa);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
