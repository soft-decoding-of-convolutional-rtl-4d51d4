// tb_ll_unit: checks the LL/LLp unit. Random alpha, beta and branch metrics
// are applied with par = 0 (data bit), the result is loaded into ll on the
// third edge; then par = 1 (parity bit) into llp. Both are compared with
// max*(paths with bit 1) - max*(paths with bit 0) of the reference model,
// and both registers must hold while their load enables are low.
`timescale 1ns/1ps
module tb_ll_unit;
  import cpc_ref_pkg::*;
  localparam int W = 14;
  localparam int IW = W + 2;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic signed [W-1:0] alpha [4], beta [4], bm [8];
  logic                par, ld_ll, ld_llp;
  logic signed [W-1:0] ll, llp;

  ll_unit dut (.clk, .rst, .alpha, .beta, .bm, .par, .ld_ll, .ld_llp, .ll, .llp);

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_ll(int av [4], int bv [4], int mv [8], int p);
    int t0 [4], t1 [4], n0, n1;
    n0 = 0; n1 = 0;
    for (int mp = 0; mp < 4; mp++)
      for (int u = 0; u < 2; u++) begin
        int pm, b;
        pm = av[mp] + mv[2*mp+u] + bv[nxt(mp, u)];
        b  = p ? cpc_ref_pkg::par(mp, u) : u;
        if (b) t1[n1++] = pm; else t0[n0++] = pm;
      end
    return clip(mstar4(t1[0], t1[1], t1[2], t1[3], IW) - mstar4(t0[0], t0[1], t0[2], t0[3], IW), 8000);
  endfunction

  initial begin
    foreach (alpha[i]) alpha[i] = '0;
    foreach (beta[i]) beta[i] = '0;
    foreach (bm[i]) bm[i] = '0;
    par = 0; ld_ll = 0; ld_llp = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int t = 0; t < 800; t++) begin
      int av [4], bv [4], mv [8], e0, e1;
      foreach (av[i]) av[i] = -$urandom_range(0, (t % 2) ? 50 : 8000);
      foreach (bv[i]) bv[i] = -$urandom_range(0, (t % 2) ? 50 : 8000);
      foreach (mv[i]) mv[i] = $urandom_range(0, (t % 4 == 0) ? 16000 : 300) - ((t % 4 == 0) ? 8000 : 150);
      e0 = ref_ll(av, bv, mv, 0);
      e1 = ref_ll(av, bv, mv, 1);
      @(negedge clk);
      foreach (av[i]) alpha[i] = W'(av[i]);
      foreach (bv[i]) beta[i] = W'(bv[i]);
      foreach (mv[i]) bm[i] = W'(mv[i]);
      par = 1'b0;
      @(negedge clk);                 // data terms sampled
      par = 1'b1;                     // parity terms sampled next
      @(negedge clk);
      ld_ll = 1'b1;
      @(negedge clk);
      ld_ll = 1'b0; ld_llp = 1'b1;
      @(negedge clk);
      ld_llp = 1'b0;
      repeat (2) @(negedge clk);
      checks += 2;
      if (ll !== W'(e0)) begin failures++; $display("FAIL t=%0d ll=%0d exp %0d", t, ll, e0); end
      if (llp !== W'(e1)) begin failures++; $display("FAIL t=%0d llp=%0d exp %0d", t, llp, e1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
