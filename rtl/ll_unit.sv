// ll_unit: log-likelihood ratio of the data bit or the parity bit of one
// trellis step k of the log-MAP decoder.
//
// Each of the 8 trellis branches (m' -> m, input u) gets the path metric
//     alpha_{k-1}(m') + BM_k[m'][u] + beta_k(m).
// The branches are split by the value of the bit in question (the input bit
// u when par = 0, the parity bit of the branch when par = 1); each half of 4
// goes through a max4 block, giving sum0 and sum1, and
//     LL = sum1 - sum0   (clipped to +/-SAT).
// With par = 0 the split is the one of the source design's LL equations; with
// par = 1 the split follows the trellis (the parity bit of each branch).
//
// Structure: 8 three-input adders, two max4 blocks and one subtractor, as in
// the source design; the same hardware serves the data and the parity bit.
//
// Timing: hold the inputs for one edge (max4 samples them), the sums are
// ready two edges after the inputs were sampled. On the third edge the
// difference is written into ll when ld_ll is high, or into llp when ld_llp
// is high. The registers keep their value otherwise.
module ll_unit #(
  parameter int unsigned W   = cpc_pkg::W_DEFAULT,
  parameter int          SAT = cpc_pkg::SAT_DEFAULT
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] alpha [4],
  input  logic signed [W-1:0] beta  [4],
  input  logic signed [W-1:0] bm    [8],
  input  logic                par,
  input  logic                ld_ll,
  input  logic                ld_llp,
  output logic signed [W-1:0] ll,
  output logic signed [W-1:0] llp
);
  import cpc_pkg::*;

  localparam int unsigned IW = W + 2;

  logic signed [IW-1:0] t0 [4];
  logic signed [IW-1:0] t1 [4];
  logic signed [IW-1:0] sum0, sum1;
  logic signed [W-1:0]  diff_c;

  always_comb begin
    int n0, n1;
    n0 = 0;
    n1 = 0;
    for (int i = 0; i < 4; i++) begin
      t0[i] = '0;
      t1[i] = '0;
    end
    for (int mp = 0; mp < 4; mp++) begin
      for (int u = 0; u < 2; u++) begin
        logic signed [IW-1:0] pm;
        logic                 bit_v;
        pm    = IW'(alpha[mp]) + IW'(bm[2*mp+u]) + IW'(beta[next_state(2'(mp), 1'(u))]);
        bit_v = par ? parity_bit(2'(mp), 1'(u)) : 1'(u);
        if (bit_v) begin
          t1[n1] = pm;
          n1 = n1 + 1;
        end else begin
          t0[n0] = pm;
          n0 = n0 + 1;
        end
      end
    end
  end

  max4 #(.W(IW)) u_sum0 (.clk, .rst, .a(t0[0]), .b(t0[1]), .c(t0[2]), .d(t0[3]), .y(sum0));
  max4 #(.W(IW)) u_sum1 (.clk, .rst, .a(t1[0]), .b(t1[1]), .c(t1[2]), .d(t1[3]), .y(sum1));

  always_comb begin
    logic signed [IW:0] d;
    d = (IW+1)'(sum1) - (IW+1)'(sum0);
    if (d > (IW+1)'(SAT))       diff_c = W'(SAT);
    else if (d < (IW+1)'(-SAT)) diff_c = W'(-SAT);
    else                        diff_c = d[W-1:0];
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      ll  <= '0;
      llp <= '0;
    end else begin
      if (ld_ll)  ll  <= diff_c;
      if (ld_llp) llp <= diff_c;
    end
  end
endmodule
