// tb_map_decoder: self-checking testbench of the log-MAP decoder.
//
// Checks, for two decoder instances (N = 5 terminated, and N = 8 with an
// open trellis end):
//  - the worked example of a 5-bit block "10101" with its noisy samples and
//    K = 5: decisions must be 10101 and the LL values must lie within 10% of
//    the floating-point log-MAP values 45.60 -45.60 45.60 -52.36 52.36;
//  - bit-exact agreement of LL, LLp and both decision vectors with the
//    integer reference model for random blocks, random a priori values, a
//    range of K values and samples driven into saturation;
//  - that noiseless codewords decode to their own data and parity bits;
//  - the latency: done exactly 3N+8 edges after the start edge.
`timescale 1ns/1ps
module tb_map_decoder;
  import cpc_pkg::*;
  import cpc_ref_pkg::*;

  localparam int W   = 14;
  localparam int SAT = 8000;
  localparam int NA  = 5;
  localparam int NB  = 8;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // instance A: default size, terminated trellis
  logic                 start_a;
  logic [KW-1:0]        k_a;
  logic signed [W-1:0]  y_a   [2*NA];
  logic signed [W-1:0]  apr_a [NA];
  logic                 busy_a, done_a;
  logic signed [W-1:0]  ll_a  [NA];
  logic signed [W-1:0]  llp_a [NA];
  logic [NA-1:0]        dd_a, dp_a;

  map_decoder u_a (
    .clk, .rst, .start(start_a), .k(k_a), .y(y_a), .apr(apr_a),
    .busy(busy_a), .done(done_a), .ll(ll_a), .llp(llp_a),
    .dec_dat(dd_a), .dec_par(dp_a)
  );

  // instance B: longer block, open trellis end
  logic                 start_b;
  logic [KW-1:0]        k_b;
  logic signed [W-1:0]  y_b   [2*NB];
  logic signed [W-1:0]  apr_b [NB];
  logic                 busy_b, done_b;
  logic signed [W-1:0]  ll_b  [NB];
  logic signed [W-1:0]  llp_b [NB];
  logic [NB-1:0]        dd_b, dp_b;

  map_decoder #(.N(NB), .TERMINATED(1'b0)) u_b (
    .clk, .rst, .start(start_b), .k(k_b), .y(y_b), .apr(apr_b),
    .busy(busy_b), .done(done_b), .ll(ll_b), .llp(llp_b),
    .dec_dat(dd_b), .dec_par(dp_b)
  );

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  // run instance A on (y, apr, k) and compare with the reference
  task automatic run_a(input int yv [], input int av [], input int kv, output int lat);
    int rl [], rlp [];
    bit rd [], rp [];
    for (int i = 0; i < 2*NA; i++) y_a[i] = W'(yv[i]);
    for (int i = 0; i < NA; i++) apr_a[i] = W'(av[i]);
    k_a = KW'(kv);
    @(negedge clk) start_a = 1'b1;
    @(posedge clk); lat = 1;
    @(negedge clk) start_a = 1'b0;
    for (int i = 0; i < 2*NA; i++) y_a[i] = W'($urandom);   // sampled only at start
    while (!done_a) begin @(posedge clk); lat++; end
    lat--;   // done is seen one edge after the edge that set it
    map_decode(NA, W, SAT, 1'b1, kv, yv, av, rl, rlp, rd, rp);
    for (int i = 0; i < NA; i++) begin
      check(ll_a[i] === W'(rl[i]),  $sformatf("A LL[%0d] %0d exp %0d", i, ll_a[i], rl[i]));
      check(llp_a[i] === W'(rlp[i]), $sformatf("A LLp[%0d] %0d exp %0d", i, llp_a[i], rlp[i]));
      check(dd_a[i] === 1'(rd[i]), $sformatf("A DecDat[%0d]", i));
      check(dp_a[i] === 1'(rp[i]), $sformatf("A DecDatP[%0d]", i));
    end
  endtask

  task automatic run_b(input int yv [], input int av [], input int kv, output int lat);
    int rl [], rlp [];
    bit rd [], rp [];
    for (int i = 0; i < 2*NB; i++) y_b[i] = W'(yv[i]);
    for (int i = 0; i < NB; i++) apr_b[i] = W'(av[i]);
    k_b = KW'(kv);
    @(negedge clk) start_b = 1'b1;
    @(posedge clk); lat = 1;
    @(negedge clk) start_b = 1'b0;
    while (!done_b) begin @(posedge clk); lat++; end
    lat--;
    map_decode(NB, W, SAT, 1'b0, kv, yv, av, rl, rlp, rd, rp);
    for (int i = 0; i < NB; i++) begin
      check(ll_b[i] === W'(rl[i]),  $sformatf("B LL[%0d] %0d exp %0d", i, ll_b[i], rl[i]));
      check(llp_b[i] === W'(rlp[i]), $sformatf("B LLp[%0d] %0d exp %0d", i, llp_b[i], rlp[i]));
      check(dd_b[i] === 1'(rd[i]), $sformatf("B DecDat[%0d]", i));
      check(dp_b[i] === 1'(rp[i]), $sformatf("B DecDatP[%0d]", i));
    end
  endtask

  initial begin
    int yv [], av [], lat;
    bit d [], c [];
    real theo [5] = '{45.60, -45.60, 45.60, -52.36, 52.36};
    start_a = 0; start_b = 0; k_a = '0; k_b = '0;
    foreach (y_a[i]) y_a[i] = '0;
    foreach (y_b[i]) y_b[i] = '0;
    foreach (apr_a[i]) apr_a[i] = '0;
    foreach (apr_b[i]) apr_b[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // worked example: samples x10, rounded
    yv = '{7, 14, -15, 16, 5, -5, -17, 11, 14, 12};
    av = '{0, 0, 0, 0, 0};
    run_a(yv, av, 5 * 1024, lat);
    check(lat == 3*NA + 8, $sformatf("latency %0d exp %0d", lat, 3*NA + 8));
    $display("example LL %0d %0d %0d %0d %0d dd=%b", ll_a[0], ll_a[1], ll_a[2], ll_a[3], ll_a[4], dd_a);
    check(dd_a === 5'b10101, $sformatf("example decisions %b", dd_a));
    for (int i = 0; i < NA; i++) begin
      real got;
      got = real'(ll_a[i]) / 10.0;
      check((got - theo[i]) * (got - theo[i]) <= (0.1 * theo[i]) * (0.1 * theo[i]),
            $sformatf("example LL[%0d]=%f vs %f", i, got, theo[i]));
    end

    // random blocks, instance A
    for (int t = 0; t < 60; t++) begin
      int kv;
      d = new[NA];
      foreach (d[i]) d[i] = $urandom_range(0, 1);
      rsc_encode(NA, d, c);
      yv = new[2*NA];
      av = new[NA];
      foreach (yv[i]) begin
        if (t % 10 == 9) yv[i] = $urandom_range(0, 16383) - 8192;   // saturation
        else             yv[i] = (c[i] ? 10 : -10) + $urandom_range(0, 24) - 12;
      end
      foreach (av[i]) av[i] = (t % 3 == 0) ? 0 : $urandom_range(0, 400) - 200;
      kv = $urandom_range(300, 6000);
      run_a(yv, av, kv, lat);
      check(lat == 3*NA + 8, $sformatf("latency %0d", lat));
    end

    // noiseless codewords, instance B: decisions equal the codeword
    for (int t = 0; t < 20; t++) begin
      d = new[NB];
      foreach (d[i]) d[i] = $urandom_range(0, 1);
      rsc_encode(NB, d, c);
      yv = new[2*NB];
      av = new[NB];
      foreach (yv[i]) yv[i] = c[i] ? 10 : -10;
      foreach (av[i]) av[i] = 0;
      run_b(yv, av, 2 * 1024, lat);
      check(lat == 3*NB + 8, $sformatf("latency B %0d", lat));
      for (int i = 0; i < NB; i++) begin
        check(dd_b[i] === 1'(d[i]), $sformatf("noiseless data bit %0d", i));
        check(dp_b[i] === 1'(c[2*i+1]), $sformatf("noiseless parity bit %0d", i));
      end
    end

    // random noisy blocks, instance B
    for (int t = 0; t < 30; t++) begin
      yv = new[2*NB];
      av = new[NB];
      foreach (yv[i]) yv[i] = $urandom_range(0, 60) - 30;
      foreach (av[i]) av[i] = $urandom_range(0, 2000) - 1000;
      run_b(yv, av, $urandom_range(100, 8000), lat);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
