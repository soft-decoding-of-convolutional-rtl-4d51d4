// tb_cpc_top: end-to-end test of the whole codec at its default size
// (N = 5, 14-bit words, 10 column and 5 row MAP decoders), with no
// parameter overridden.
//
// Each trial builds a 5x5 data matrix, encodes it with the codec's own
// product encoder (checked against the reference encoder), maps bits to
// +/-1, adds Gaussian noise, scales by 10,
// writes the 10x10 matrix into the decoder's RAM through the host port and
// runs a number of iterations. Checks:
//  - o_r (LL/LLp of every row position) and the decided data agree bit for
//    bit with the integer reference model after every iteration;
//  - done arrives exactly 1 + 4N^2 + m(6N+18) edges after the start edge
//    inclusive (the start edge itself issues the first RAM read);
//  - the first trial uses the 5x5 example data matrix at sigma^2 = 0.2 and
//    must decode without error after 2 iterations; the published noisy
//    received matrix of that example is also decoded and, as reported for
//    the original design, leaves one data error after 1 iteration and none
//    after 2.
// Mechanisms counted, each must occur at least once: RAM load, column pass,
// row pass, a priori refresh with non-zero p, an iteration that corrects a
// decision error left by the previous one, saturation of an LLR at +/-SAT,
// iters = 0 taken as one iteration, and an encoder run.
`timescale 1ns/1ps
module tb_cpc_top;
  import cpc_pkg::*;
  import cpc_ref_pkg::*;

  localparam int N   = 5;
  localparam int W   = 14;
  localparam int SAT = 8000;
  localparam int AW  = $clog2(4*N*N);

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
  int n_load = 0, n_col = 0, n_row = 0, n_prefresh = 0, n_correct = 0, n_sat = 0, n_zero_it = 0, n_enc = 0;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
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

  // count column and row passes from the decoders' start pulses
  always @(posedge clk) begin
    if (top.u_dec.col_start) n_col++;
    if (top.u_dec.row_start) n_row++;
    if (top.u_dec.row_start) begin
      for (int r = 0; r < N; r++)
        for (int c = 0; c < 2*N; c++) if (top.u_dec.p[r][c] != 0) begin n_prefresh++; break; end
    end
  end

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1, 1000000))) / 1000000.0;
    u2 = (real'($urandom_range(0, 1000000))) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307 * u2);
  endfunction

  function automatic int q10(real v);
    int r;
    r = $rtoi(v * 10.0 + ((v >= 0.0) ? 0.5 : -0.5));
    if (r > 8191) r = 8191;
    if (r < -8192) r = -8192;
    return r;
  endfunction

  // encode d with the codec's encoder; compare with the reference encoder
  task automatic hw_encode(input bit d [], output bit code []);
    bit rc [];
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) enc_data[r][c] = d[r*N + c];
    @(negedge clk) enc_start = 1'b1;
    @(negedge clk) enc_start = 1'b0;
    while (!enc_done) @(posedge clk);
    @(negedge clk);
    n_enc++;
    product_encode(N, d, rc);
    code = new[4*N*N];
    for (int r = 0; r < 2*N; r++)
      for (int c = 0; c < 2*N; c++) begin
        code[r*2*N + c] = enc_code[r][c];
        check(enc_code[r][c] === 1'(rc[r*2*N + c]), $sformatf("encoder code[%0d][%0d]", r, c));
      end
  endtask

  // write yc into the RAM, run m iterations, compare with the reference
  task automatic run(input int yc [], input int kv, input int m, input bit dref [], output int errs);
    int lat, it, errs_prev;
    int ro [];
    bit rd [];
    for (int i = 0; i < 4*N*N; i++) begin
      @(negedge clk);
      ram_we = 1'b1; ram_addr = AW'(i); ram_din = W'(yc[i]);
    end
    @(negedge clk) ram_we = 1'b0;
    n_load++;
    iters = 8'(m); k_chan = KW'(kv);
    @(negedge clk) start = 1'b1;
    @(posedge clk); lat = 1;
    @(negedge clk) start = 1'b0;
    it = 0;
    errs_prev = -1;
    errs = 0;
    while (!done) begin
      @(posedge clk); lat++;
      if (iter_done) begin
        int e;
        it++;
        product_decode(N, W, SAT, kv, 512, it, yc, ro, rd);
        e = 0;
        for (int r = 0; r < N; r++)
          for (int c = 0; c < 2*N; c++) begin
            check(o_r[r][c] === W'(ro[r*2*N + c]),
                  $sformatf("iter %0d o_r[%0d][%0d]=%0d exp %0d", it, r, c, o_r[r][c], ro[r*2*N + c]));
            if (o_r[r][c] == W'(SAT) || o_r[r][c] == W'(-SAT)) n_sat++;
          end
        for (int r = 0; r < N; r++)
          for (int c = 0; c < N; c++) begin
            check(dec_data[r][c] === 1'(rd[r*N + c]), $sformatf("iter %0d dec[%0d][%0d]", it, r, c));
            if (dec_data[r][c] != dref[r*N + c]) e++;
          end
        if (errs_prev > 0 && e < errs_prev) n_correct++;
        errs_prev = e;
        errs = e;
      end
    end
    lat--;
    check(lat == 1 + 4*N*N + ((m == 0) ? 1 : m) * (6*N + 18),
          $sformatf("latency %0d exp %0d", lat, 1 + 4*N*N + ((m == 0) ? 1 : m) * (6*N + 18)));
    check(it == ((m == 0) ? 1 : m), $sformatf("iterations %0d", it));
    if (m == 0) n_zero_it++;
  endtask

  initial begin
    bit d [], code [];
    int yc [], errs;
    // 5x5 example data matrix (row major)
    bit ex [25] = '{1,1,1,1,1, 0,0,0,1,0, 1,0,0,1,1, 1,0,0,0,0, 0,0,0,1,1};
    // printed noisy received matrix of the example (row major, x10 rounded)
    real rx [100] = '{
       0.982,  0.943,  0.242, -1.881,  1.160, -0.507,  1.110,  0.704, -0.149, -2.786,
       0.702,  0.535, -0.327, -1.689,  1.428,  1.297,  1.792, -0.220,  0.087, -0.305,
       0.421, -1.628, -0.250,  0.302, -1.946, -0.234,  1.383,  0.817,  1.237,  0.674,
       0.082, -0.136,  2.001, -1.083,  0.888,  0.757, -0.063, -1.902,  0.925,  1.499,
      -0.157,  2.232, -0.102,  2.074,  0.662,  1.281,  0.406, -0.518,  0.096,  0.888,
      -2.002, -1.228,  1.060,  1.786,  2.080, -1.831,  1.983,  0.478, -2.023, -0.043,
       0.446,  1.315, -2.000,  1.800, -1.200,  0.184, -1.667, -0.980, -1.828,  1.838,
      -1.681,  0.439, -1.281, -2.137, -1.219, -0.687, -0.955,  1.806,  1.072,  1.027,
       0.369, -0.395, -0.797, -2.337, -0.828, -1.351,  1.320, -0.011, -1.397, -1.343,
      -0.511,  0.308,  1.919, -0.552,  0.750,  0.900,  0.124, -0.131,  0.824, -0.131};

    ram_we = 0; ram_addr = '0; ram_din = '0; start = 0; iters = '0; k_chan = '0;
    enc_start = 0;
    foreach (enc_data[i]) enc_data[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // trial 1: example data, sigma^2 = 0.2 (K = 5), 2 iterations
    d = new[25];
    foreach (d[i]) d[i] = ex[i];
    hw_encode(d, code);
    yc = new[100];
    foreach (yc[i]) yc[i] = q10((code[i] ? 1.0 : -1.0) + $sqrt(0.2) * gauss());
    run(yc, 5 * 1024, 2, d, errs);
    check(errs == 0, $sformatf("example data: %0d errors after 2 iterations", errs));

    // trial 2: the printed received matrix, 2 iterations, reference agreement
    foreach (yc[i]) yc[i] = q10(rx[i]);
    run(yc, 5 * 1024, 1, d, errs);
    $display("printed example matrix: %0d data errors after 1 iteration", errs);
    check(errs == 1, "printed example matrix: one data error left after 1 iteration");
    run(yc, 5 * 1024, 2, d, errs);
    $display("printed example matrix: %0d data errors after 2 iterations", errs);
    check(errs == 0, "printed example matrix decodes after 2 iterations");

    // random trials at low SNR with several iterations
    for (int t = 0; t < 12; t++) begin
      real s2;
      foreach (d[i]) d[i] = $urandom_range(0, 1);
      hw_encode(d, code);
      s2 = (t < 6) ? 1.2 : 0.8;
      foreach (yc[i]) yc[i] = q10((code[i] ? 1.0 : -1.0) + $sqrt(s2) * gauss());
      run(yc, $rtoi(1024.0 / s2), (t % 4 == 3) ? 0 : 4, d, errs);
    end

    // noiseless, strong K: metrics saturate
    foreach (d[i]) d[i] = $urandom_range(0, 1);
    hw_encode(d, code);
    foreach (yc[i]) yc[i] = code[i] ? 400 : -400;
    run(yc, 40 * 1024, 3, d, errs);
    check(errs == 0, "noiseless saturated trial decodes");

    $display("encoder runs=%0d", n_enc);
    $display("mechanisms: load=%0d col=%0d row=%0d p_refresh=%0d corrected=%0d sat=%0d iters0=%0d",
             n_load, n_col, n_row, n_prefresh, n_correct, n_sat, n_zero_it);
    check(n_load > 0, "RAM load happened");
    check(n_col > 0, "column pass happened");
    check(n_row > 0, "row pass happened");
    check(n_prefresh > 0, "a priori refresh with non-zero p happened");
    check(n_correct > 0, "an iteration corrected earlier decision errors");
    check(n_sat > 0, "LLR saturation happened");
    check(n_zero_it > 0, "iters = 0 run happened");
    check(n_enc > 0, "encoder run happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
