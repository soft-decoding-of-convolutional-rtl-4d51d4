// map_decoder: log-MAP (BCJR) soft-in/soft-out decoder for one block of N
// data/parity pairs of the (1, 5/7) recursive systematic convolutional code.
//
// Algorithm (all values in tenths, see cpc_pkg):
//   1. branch metrics BM_k[m][u] for k = 1..N (N bm_unit blocks in parallel);
//   2. forward metrics alpha_k, k = 1..N-1, from alpha_0 = (0,-SAT,-SAT,-SAT),
//      and at the same time backward metrics beta_k, k = N-1..1, from beta_N
//      (state 0 known when the trellis is terminated, all zero otherwise);
//      each step is normalised by subtracting nonterm = max* of its 4 values;
//   3. LL(k) = log P(u_k=1|y) - log P(u_k=0|y) for all k in parallel (N ll_unit
//      blocks), then LLp(k) for the parity bits with the same hardware;
//   4. hard decisions DecDat(k) = LL(k) > 0, then DecDatP(k) = LLp(k) > 0.
// The sequence is driven by a state/step counter, as in the source design.
//
// Storage: branch metrics 8N words (inside the bm_unit blocks), alpha 4N,
// beta 4N, a priori N (inside bm_unit), LL and LLp N each, decisions 2N bits.
//
// Interface: pulse start for one cycle with the block on y (y[2k-2] = data
// sample k, y[2k-1] = parity sample k), the a priori LLRs of the data bits on
// apr and the channel factor K = 1/sigma^2 on k (KF fractional bits); these
// are sampled on the start edge only. busy is high while decoding. done
// pulses for one cycle when ll, llp, dec_dat and dec_par are valid; they
// hold until the next start. start while busy is not allowed.
//
// Timing: done rises 3N+8 edges after the start edge inclusive, the count
// given by the source design: 3 (branch metrics) + 3(N-1) (alpha/beta with
// nonterm) + 6 (LL, LLp) + 2 (decisions). One detail is this design's own: a
// step's normalised metrics are written to storage on the first edge of the
// next step (or of the LL phase), and that edge reads them straight from the
// subtractors, so the write costs no cycle.
module map_decoder #(
  parameter int unsigned N          = 5,
  parameter int unsigned W          = cpc_pkg::W_DEFAULT,
  parameter int          SAT        = cpc_pkg::SAT_DEFAULT,
  parameter bit          TERMINATED = 1'b1
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    start,
  input  logic [cpc_pkg::KW-1:0]  k,
  input  logic signed [W-1:0]     y       [2*N],
  input  logic signed [W-1:0]     apr     [N],
  output logic                    busy,
  output logic                    done,
  output logic signed [W-1:0]     ll      [N],
  output logic signed [W-1:0]     llp     [N],
  output logic [N-1:0]            dec_dat,
  output logic [N-1:0]            dec_par
);
  import cpc_pkg::*;

  localparam int unsigned SW = $clog2(N + 1);

  typedef enum logic [2:0] {S_IDLE, S_BM, S_REC, S_LL, S_DEC} state_e;

  state_e          state;
  logic [2:0]      sub;     // edge counter inside BM, LL and DEC phases
  logic [1:0]      ph;      // 0,1,2 = edges A,B,C of a recursion step
  logic [SW-1:0]   step;    // recursion step s = 1..N-1

  logic signed [W-1:0] bm       [N][8];    // BM_{k+1} at index k
  logic signed [W-1:0] alpha_q  [N][4];    // alpha_k at index k = 0..N-1
  logic signed [W-1:0] beta_q   [N+1][4];  // beta_k at index k = 1..N
  logic signed [W-1:0] a_prev   [4], b_prev [4];
  logic signed [W-1:0] a_norm   [4], b_norm [4];
  logic signed [W-1:0] a_rd     [N][4];    // alpha_{k} as read by the LL units
  logic signed [W-1:0] b_rd     [N+1][4];
  logic signed [W-1:0] bm_a     [8], bm_b [8];
  logic                bm_en, first_edge, ll_par, ld_ll, ld_llp;

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state   <= S_IDLE;
      sub     <= '0;
      ph      <= '0;
      step    <= '0;
      done    <= 1'b0;
      dec_dat <= '0;
      dec_par <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_BM;
          sub   <= 3'd1;
        end
        S_BM: begin
          sub <= sub + 3'd1;
          if (sub == 3'd2) begin
            state <= S_REC;
            step  <= SW'(1);
            ph    <= 2'd0;
          end
        end
        S_REC: begin
          if (ph == 2'd2) begin
            ph <= 2'd0;
            if (step == SW'(N - 1)) begin
              state <= S_LL;
              sub   <= '0;
            end else begin
              step <= step + SW'(1);
            end
          end else begin
            ph <= ph + 2'd1;
          end
        end
        S_LL: begin
          sub <= sub + 3'd1;
          if (sub == 3'd5) begin
            state <= S_DEC;
            sub   <= '0;
          end
        end
        S_DEC: begin
          sub <= sub + 3'd1;
          if (sub == 3'd0) begin
            for (int i = 0; i < int'(N); i++) dec_dat[i] <= (ll[i] > 0);
          end else begin
            for (int i = 0; i < int'(N); i++) dec_par[i] <= (llp[i] > 0);
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy       = (state != S_IDLE);
  assign bm_en      = (state == S_IDLE && start) || (state == S_BM);
  // first edge of a recursion step from step 2 on, or first edge of LL:
  // the previous step's normalised metrics are on a_norm / b_norm.
  assign first_edge = (state == S_REC && ph == 2'd0 && step != SW'(1)) ||
                      (state == S_LL && sub == 3'd0);
  assign ll_par     = (state == S_LL) && (sub >= 3'd3);
  assign ld_ll      = (state == S_LL) && (sub == 3'd2);
  assign ld_llp     = (state == S_LL) && (sub == 3'd5);

  // ------------------------------------------------------- branch metrics
  for (genvar i = 0; i < N; i++) begin : g_bm
    bm_unit #(.W(W), .SAT(SAT)) u_bm (
      .clk, .rst, .en(bm_en),
      .y(y[2*i]), .yp(y[2*i+1]), .apr(apr[i]), .k(k),
      .bm(bm[i])
    );
  end

  // ------------------------------------------------- alpha/beta recursions
  // step s: alpha_s from alpha_{s-1} and BM_s; beta_{N-s} from beta_{N-s+1}
  // and BM_{N-s+1}.
  always_comb begin
    int s;
    s = int'(step);
    if (s < 1) s = 1;
    if (s > int'(N) - 1) s = int'(N) - 1;
    for (int m = 0; m < 4; m++) begin
      if (first_edge) begin
        a_prev[m] = a_norm[m];
        b_prev[m] = b_norm[m];
      end else begin
        a_prev[m] = alpha_q[s-1][m];
        b_prev[m] = beta_q[int'(N)-s+1][m];
      end
    end
    for (int j = 0; j < 8; j++) begin
      bm_a[j] = bm[s-1][j];
      bm_b[j] = bm[int'(N)-s][j];
    end
  end

  metric_recursion #(.W(W), .SAT(SAT), .FWD(1'b1)) u_alpha (
    .clk, .rst, .prev(a_prev), .bm(bm_a), .norm(a_norm)
  );
  metric_recursion #(.W(W), .SAT(SAT), .FWD(1'b0)) u_beta (
    .clk, .rst, .prev(b_prev), .bm(bm_b), .norm(b_norm)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < int'(N); i++)
        for (int m = 0; m < 4; m++) alpha_q[i][m] <= '0;
      for (int i = 0; i <= int'(N); i++)
        for (int m = 0; m < 4; m++) beta_q[i][m] <= '0;
    end else if (state == S_IDLE && start) begin
      for (int m = 0; m < 4; m++) begin
        alpha_q[0][m] <= (m == 0) ? W'(0) : W'(-SAT);
        beta_q[N][m]  <= (m == 0 || !TERMINATED) ? W'(0) : W'(-SAT);
      end
    end else if (first_edge) begin
      // results of step s-1 (or of step N-1 on the first LL edge)
      int s;
      s = (state == S_LL) ? int'(N) : int'(step);
      for (int m = 0; m < 4; m++) begin
        alpha_q[s-1][m]          <= a_norm[m];
        beta_q[int'(N)-s+1][m]   <= b_norm[m];
      end
    end
  end

  // ------------------------------------------------------------ LL / LLp
  always_comb begin
    for (int i = 0; i < int'(N); i++) a_rd[i] = alpha_q[i];
    for (int i = 0; i <= int'(N); i++) b_rd[i] = beta_q[i];
    if (state == S_LL && sub == 3'd0) begin
      a_rd[N-1] = a_norm;
      b_rd[1]   = b_norm;
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_ll
    ll_unit #(.W(W), .SAT(SAT)) u_ll (
      .clk, .rst,
      .alpha(a_rd[i]), .beta(b_rd[i+1]), .bm(bm[i]),
      .par(ll_par), .ld_ll(ld_ll), .ld_llp(ld_llp),
      .ll(ll[i]), .llp(llp[i])
    );
  end

  // ------------------------------------------------------------ assertions
  a_no_restart: assert property (@(posedge clk) disable iff (rst) start |-> !busy)
    else $error("map_decoder: start while busy");

  initial begin
    if (N < 2) $error("map_decoder: N must be at least 2");
  end
endmodule
