// bm_unit: branch metrics of one trellis step of the (1, 5/7) code.
//
// For every state m (0..3) and input bit u (0/1) the branch metric is
//     BM[m][u] = K*(y*xd + yp*xp) + pa(u)
// where xd, xp are the BPSK symbols (binary 1 -> +1, binary 0 -> -1) of the
// data and parity bit that the branch emits, K = 1/sigma^2 is the channel
// reliability factor and pa(u) is the a priori term, +apr/2 for u = 1 and
// -apr/2 for u = 0 (apr is the a priori log-likelihood ratio of the data bit,
// so the two terms are each other's negative as in the source design).
//
// Pipeline (three cycles, as in the source design: two for the multiplication
// and one for the addition):
//   cycle 1: K*y and K*yp are multiplied and registered, apr is registered;
//   cycle 2: the products are rounded back to tenths and clipped to +/-SAT;
//   cycle 3: the eight sums are formed, clipped to +/-SAT and registered.
// Only two multipliers are used: the eight metrics differ only in signs.
//
// Interface: y, yp, apr are signed W-bit values in tenths, k is unsigned with
// KF fractional bits. The pipeline advances on edges where en is high: with
// en high on three consecutive edges, bm[2*m+u] holds the metrics of the
// inputs sampled on the first of them, and keeps them while en stays low
// (the bm outputs are the decoder's branch-metric registers). No handshake:
// the MAP decoder's counter drives en.
module bm_unit #(
  parameter int unsigned W   = cpc_pkg::W_DEFAULT,
  parameter int          SAT = cpc_pkg::SAT_DEFAULT
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         en,
  input  logic signed [W-1:0]          y,
  input  logic signed [W-1:0]          yp,
  input  logic signed [W-1:0]          apr,
  input  logic [cpc_pkg::KW-1:0]       k,
  output logic signed [W-1:0]          bm [8]
);
  import cpc_pkg::*;

  localparam int unsigned PW = W + KW + 1;
  localparam int unsigned SW = W + 3;

  logic signed [PW-1:0] prod_d, prod_p;
  logic signed [W-1:0]  apr_q1, apr_q2;
  logic signed [W-1:0]  ky, kyp;

  function automatic logic signed [W-1:0] clip_p(input logic signed [PW-1:0] v);
    logic signed [PW-1:0] r;
    r = (v + PW'(1 << (KF-1))) >>> KF;
    if (r > PW'(SAT))       return W'(SAT);
    else if (r < PW'(-SAT)) return W'(-SAT);
    else                    return r[W-1:0];
  endfunction

  function automatic logic signed [W-1:0] clip_s(input logic signed [SW-1:0] v);
    if (v > SW'(SAT))       return W'(SAT);
    else if (v < SW'(-SAT)) return W'(-SAT);
    else                    return v[W-1:0];
  endfunction

  // cycle 1: multiply
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      prod_d <= '0;
      prod_p <= '0;
      apr_q1 <= '0;
    end else if (en) begin
      prod_d <= PW'(y)  * signed'(PW'(k));
      prod_p <= PW'(yp) * signed'(PW'(k));
      apr_q1 <= apr;
    end
  end

  // cycle 2: round and clip the products
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      ky     <= '0;
      kyp    <= '0;
      apr_q2 <= '0;
    end else if (en) begin
      ky     <= clip_p(prod_d);
      kyp    <= clip_p(prod_p);
      apr_q2 <= apr_q1;
    end
  end

  // cycle 3: the eight branch sums
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < 8; i++) bm[i] <= '0;
    end else if (en) begin
      for (int m = 0; m < 4; m++) begin
        for (int u = 0; u < 2; u++) begin
          logic signed [SW-1:0] sd, sp, sa;
          sd = (u == 1) ? SW'(ky) : -SW'(ky);
          sp = parity_bit(2'(m), 1'(u)) ? SW'(kyp) : -SW'(kyp);
          sa = (u == 1) ? (SW'(apr_q2) >>> 1) : -(SW'(apr_q2) >>> 1);
          bm[2*m+u] <= clip_s(sd + sp + sa);
        end
      end
    end
  end
endmodule
