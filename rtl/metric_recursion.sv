// metric_recursion: one step of the forward (alpha) or backward (beta)
// state-metric recursion of the log-MAP decoder, with normalisation.
//
// Forward (FWD = 1):  raw(m)  = max* over the two branches (m' -> m) of
//                               prev(m') + BM[m'][u]
// Backward (FWD = 0): raw(m') = max* over u of prev(next(m',u)) + BM[m'][u]
// Normalisation:      nonterm = max*(raw(0), raw(1), raw(2), raw(3))
//                     norm(m) = raw(m) - nonterm, clipped to [-SAT, +SAT]
// The branch connections come from cpc_pkg::next_state (the trellis of the
// (1, 5/7) code); for the default code they are the ones of the source
// design's alpha and beta equations.
//
// Structure: 8 adders and 4 max2 blocks for the recursion (one cycle) and a
// max4 block for the nonterm (two cycles). The internal width is W+2 so that
// prev + BM cannot overflow before the clipping.
//
// Interface: prev[m] are the normalised metrics of the previous step, bm[2m+u]
// the branch metrics of the step. Timing: hold prev and bm for three clock
// edges; norm is then valid (combinationally) until the next edge. The caller
// may feed norm straight back into prev on that next edge, provided it keeps
// the same values on prev for the following two edges (the MAP decoder does
// this by storing norm on that edge).
module metric_recursion #(
  parameter int unsigned W   = cpc_pkg::W_DEFAULT,
  parameter int          SAT = cpc_pkg::SAT_DEFAULT,
  parameter bit          FWD = 1'b1
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] prev [4],
  input  logic signed [W-1:0] bm   [8],
  output logic signed [W-1:0] norm [4]
);
  import cpc_pkg::*;

  localparam int unsigned IW = W + 2;

  logic signed [IW-1:0] cand [4][2];
  logic signed [IW-1:0] raw  [4];
  logic signed [IW-1:0] nonterm;

  always_comb begin
    int slot [4];
    for (int m = 0; m < 4; m++) begin
      slot[m] = 0;
      cand[m][0] = '0;
      cand[m][1] = '0;
    end
    for (int mp = 0; mp < 4; mp++) begin
      for (int u = 0; u < 2; u++) begin
        logic [1:0] t;
        t = next_state(2'(mp), 1'(u));
        if (FWD) begin
          cand[t][slot[t]] = IW'(prev[mp]) + IW'(bm[2*mp+u]);
          slot[t] = slot[t] + 1;
        end else begin
          cand[mp][u] = IW'(prev[t]) + IW'(bm[2*mp+u]);
        end
      end
    end
  end

  for (genvar m = 0; m < 4; m++) begin : g_acs
    max2 #(.W(IW)) u_max2 (.clk, .rst, .a(cand[m][0]), .b(cand[m][1]), .y(raw[m]));
  end

  max4 #(.W(IW)) u_nonterm (
    .clk, .rst, .a(raw[0]), .b(raw[1]), .c(raw[2]), .d(raw[3]), .y(nonterm)
  );

  always_comb begin
    for (int m = 0; m < 4; m++) begin
      logic signed [IW:0] d;
      d = (IW+1)'(raw[m]) - (IW+1)'(nonterm);
      if (d > (IW+1)'(SAT))       norm[m] = W'(SAT);
      else if (d < (IW+1)'(-SAT)) norm[m] = W'(-SAT);
      else                        norm[m] = d[W-1:0];
    end
  end
endmodule
