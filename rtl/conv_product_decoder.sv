// conv_product_decoder: iterative soft decoder of a convolutional product
// code built from the (1, 5/7) recursive systematic code.
//
// Code: an N x N data matrix is encoded row by row (N x 2N, each row
// d1 p1 d2 p2 ... dN pN), then column by column, giving a 2N x 2N codeword
// whose column c reads d1 p1 ... dN pN of the column code downwards. No
// trellis termination is used, so all decoders start their backward
// recursion from equally likely states.
//
// Decoder (one iteration):
//   column pass: 2N map_decoder blocks decode the 2N columns of y_c at once,
//                with the a priori matrix p (N x 2N) as a priori input and
//                the channel factor k_chan;
//   y_r = LL_col - p                               (one cycle, 2N^2 subtractors)
//   row pass:    N map_decoder blocks decode the N rows of y_r at once with
//                zero a priori input; their LL and LLp form o_r (N x 2N);
//   p   = o_r - y_r                                (one cycle)
// p starts at zero and is refreshed every iteration. The decided data are
// the signs of the data positions of o_r.
//
// The received matrix is written into a single-port RAM (input_ram) by the
// host while the decoder is idle, word r*2N+c for row r, column c; after
// start it is copied into registers at one word per cycle (4N^2 cycles).
//
// Row decoders: y_r is already a log-likelihood ratio, so the row decoders
// use a fixed K = 0.5 (K_ROW), which makes their branch metrics carry half of
// each LLR, the same scale as a channel sample weighted by K = 1/sigma^2.
// This value is this design's choice.
//
// Interface: hold ram_we/ram_addr/ram_din to load the matrix while busy is
// low. Pulse start with iters (number of iterations, 0 is taken as 1) and
// k_chan (K = 1/sigma^2 of the channel, KF fractional bits). done pulses for
// one cycle when o_r and dec_data hold the result of the last iteration;
// iter_done pulses at the end of every iteration.
// Timing: the start edge issues the first RAM read; then 4N^2 edges load the
// matrix and each iteration takes 6N+18 edges (3N+8 column pass, 1
// subtraction, 3N+8 row pass, 1 subtraction), the operation time of the
// source design. done is set on edge 1 + 4N^2 + iters*(6N+18), counting the
// start edge as 1; iter_done on the last edge of every iteration.
module conv_product_decoder #(
  parameter int unsigned N      = 5,
  parameter int unsigned W      = cpc_pkg::W_DEFAULT,
  parameter int          SAT    = cpc_pkg::SAT_DEFAULT,
  parameter int unsigned IT_W   = 8,
  parameter int unsigned K_ROW  = 512,
  parameter int unsigned DEPTH  = 4 * N * N,
  parameter int unsigned AW     = $clog2(DEPTH)
) (
  input  logic                    clk,
  input  logic                    rst,
  // host access to the received-data RAM
  input  logic                    ram_we,
  input  logic [AW-1:0]           ram_addr,
  input  logic signed [W-1:0]     ram_din,
  // control
  input  logic                    start,
  input  logic [IT_W-1:0]         iters,
  input  logic [cpc_pkg::KW-1:0]  k_chan,
  output logic                    busy,
  output logic                    iter_done,
  output logic                    done,
  // results
  output logic signed [W-1:0]     o_r      [N][2*N],
  output logic [N-1:0]            dec_data [N]
);
  import cpc_pkg::*;

  typedef enum logic [2:0] {P_IDLE, P_LOAD, P_COL, P_ROW} pstate_e;

  pstate_e               state;
  logic [AW-1:0]         lcnt;
  logic [IT_W-1:0]       it, it_last;
  logic                  kick;
  logic [KW-1:0]         k_q;

  logic [AW-1:0]         rd_addr, mem_addr;
  logic signed [W-1:0]   mem_dout;

  logic signed [W-1:0]   yc  [2*N][2*N];
  logic signed [W-1:0]   yr  [N][2*N];
  logic signed [W-1:0]   p   [N][2*N];

  // column decoder signals
  logic                  col_start, row_start;
  logic [2*N-1:0]        col_busy, col_done;
  logic [N-1:0]          row_busy, row_done;
  logic signed [W-1:0]   col_y   [2*N][2*N];
  logic signed [W-1:0]   col_apr [2*N][N];
  logic signed [W-1:0]   col_ll  [2*N][N];
  logic signed [W-1:0]   row_apr [N][N];
  logic signed [W-1:0]   row_ll  [N][N];
  logic signed [W-1:0]   row_llp [N][N];

  function automatic logic signed [W-1:0] sub_clip(input logic signed [W-1:0] a,
                                                   input logic signed [W-1:0] b);
    logic signed [W:0] d;
    d = (W+1)'(a) - (W+1)'(b);
    if (d > (W+1)'(SAT))       return W'(SAT);
    else if (d < (W+1)'(-SAT)) return W'(-SAT);
    else                       return d[W-1:0];
  endfunction

  // ------------------------------------------------------ received-data RAM
  assign rd_addr  = (state == P_LOAD) ? AW'(lcnt + AW'(1)) : '0;
  assign mem_addr = (state == P_IDLE && ram_we) ? ram_addr : rd_addr;

  input_ram #(.DEPTH(DEPTH), .W(W), .AW(AW)) u_ram (
    .clk, .we(state == P_IDLE && ram_we), .addr(mem_addr),
    .din(ram_din), .dout(mem_dout)
  );

  // ------------------------------------------------------------- control
  assign busy      = (state != P_IDLE);
  assign col_start = (state == P_COL) && kick;
  assign row_start = (state == P_ROW) && kick;
  assign it_last   = (iters == '0) ? IT_W'(1) : iters;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state     <= P_IDLE;
      lcnt      <= '0;
      it        <= '0;
      kick      <= 1'b0;
      k_q       <= '0;
      done      <= 1'b0;
      iter_done <= 1'b0;
    end else begin
      done      <= 1'b0;
      iter_done <= 1'b0;
      kick      <= 1'b0;
      unique case (state)
        P_IDLE: if (start && !ram_we) begin
          state <= P_LOAD;
          lcnt  <= '0;
          it    <= '0;
          k_q   <= k_chan;
        end
        P_LOAD: begin
          lcnt <= lcnt + AW'(1);
          if (lcnt == AW'(DEPTH - 1)) begin
            state <= P_COL;
            kick  <= 1'b1;
          end
        end
        P_COL: if (col_done[0]) begin
          state <= P_ROW;
          kick  <= 1'b1;
        end
        P_ROW: if (row_done[0]) begin
          iter_done <= 1'b1;
          it        <= it + IT_W'(1);
          if (it + IT_W'(1) >= it_last) begin
            state <= P_IDLE;
            done  <= 1'b1;
          end else begin
            state <= P_COL;
            kick  <= 1'b1;
          end
        end
        default: state <= P_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------- matrix registers
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int r = 0; r < 2*int'(N); r++)
        for (int c = 0; c < 2*int'(N); c++) yc[r][c] <= '0;
    end else if (state == P_LOAD) begin
      yc[int'(lcnt) / (2*int'(N))][int'(lcnt) % (2*int'(N))] <= mem_dout;
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int r = 0; r < int'(N); r++)
        for (int c = 0; c < 2*int'(N); c++) begin
          yr[r][c] <= '0;
          p[r][c]  <= '0;
        end
    end else if (state == P_IDLE && start && !ram_we) begin
      for (int r = 0; r < int'(N); r++)
        for (int c = 0; c < 2*int'(N); c++) p[r][c] <= '0;
    end else if (state == P_COL && col_done[0]) begin
      // y_r = LL of the column decoders - p
      for (int r = 0; r < int'(N); r++)
        for (int c = 0; c < 2*int'(N); c++) yr[r][c] <= sub_clip(col_ll[c][r], p[r][c]);
    end else if (state == P_ROW && row_done[0]) begin
      // p = o_r - y_r
      for (int r = 0; r < int'(N); r++)
        for (int c = 0; c < 2*int'(N); c++) p[r][c] <= sub_clip(o_r[r][c], yr[r][c]);
    end
  end

  // ------------------------------------------------------ column decoders
  always_comb begin
    for (int c = 0; c < 2*int'(N); c++) begin
      for (int r = 0; r < 2*int'(N); r++) col_y[c][r] = yc[r][c];
      for (int r = 0; r < int'(N); r++)   col_apr[c][r] = p[r][c];
    end
  end

  for (genvar c = 0; c < 2*N; c++) begin : g_col
    map_decoder #(.N(N), .W(W), .SAT(SAT), .TERMINATED(1'b0)) u_dec (
      .clk, .rst, .start(col_start), .k(k_q), .y(col_y[c]), .apr(col_apr[c]),
      .busy(col_busy[c]), .done(col_done[c]), .ll(col_ll[c]), .llp(),
      .dec_dat(), .dec_par()
    );
  end

  // --------------------------------------------------------- row decoders
  always_comb begin
    for (int r = 0; r < int'(N); r++)
      for (int c = 0; c < int'(N); c++) row_apr[r][c] = '0;
  end

  for (genvar r = 0; r < N; r++) begin : g_row
    map_decoder #(.N(N), .W(W), .SAT(SAT), .TERMINATED(1'b0)) u_dec (
      .clk, .rst, .start(row_start), .k(KW'(K_ROW)), .y(yr[r]), .apr(row_apr[r]),
      .busy(row_busy[r]), .done(row_done[r]), .ll(row_ll[r]), .llp(row_llp[r]),
      .dec_dat(dec_data[r]), .dec_par()
    );
    for (genvar c = 0; c < N; c++) begin : g_or
      assign o_r[r][2*c]   = row_ll[r][c];
      assign o_r[r][2*c+1] = row_llp[r][c];
    end
  end

  // ------------------------------------------------------------ assertions
  a_load_idle: assert property (@(posedge clk) disable iff (rst) ram_we |-> !busy)
    else $error("conv_product_decoder: RAM written while decoding");
  a_col_busy: assert property (@(posedge clk) disable iff (rst) col_busy[0] |-> (&col_busy))
    else $error("conv_product_decoder: column decoders not started together");
  a_row_busy: assert property (@(posedge clk) disable iff (rst) row_busy[0] |-> (&row_busy))
    else $error("conv_product_decoder: row decoders not started together");
  a_col_lockstep: assert property (@(posedge clk) disable iff (rst) col_done[0] |-> (&col_done))
    else $error("conv_product_decoder: column decoders out of step");
  a_row_lockstep: assert property (@(posedge clk) disable iff (rst) row_done[0] |-> (&row_done))
    else $error("conv_product_decoder: row decoders out of step");
endmodule
