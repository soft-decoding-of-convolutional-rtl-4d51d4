// max2: registered two-input max* operator of the log-domain MAP decoder.
//
// Computes max*(a,b) = ln(e^a + e^b) = max(a,b) + ln(1+exp(-|a-b|)). The
// maximum is taken exactly; the correction term is looked up in the 8-entry
// table cpc_pkg::maxstar_corr (values in tenths, step 0.1). A sum that would
// pass the largest positive W-bit value is clipped to it.
//
// Interface: a, b are signed W-bit operands; y is the registered result.
// Timing: one clock of latency, a new operation every cycle. Reset is
// asynchronous and active high, as the source design calls for an
// asynchronous reset (the polarity is this design's choice).
module max2 #(
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] y
);
  import cpc_pkg::*;

  localparam logic signed [W:0] MAXPOS = (W+1)'((1 << (W-1)) - 1);

  logic signed [W:0] diff;
  logic [W:0]        diff_abs;
  logic signed [W:0] big;
  logic signed [W:0] sum;

  always_comb begin
    diff     = (W+1)'(a) - (W+1)'(b);
    diff_abs = diff[W] ? (W+1)'(-diff) : (W+1)'(diff);
    big      = (diff[W]) ? (W+1)'(b) : (W+1)'(a);
    sum      = big + (W+1)'(signed'({1'b0, maxstar_corr(32'(diff_abs))}));
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) y <= '0;
    else     y <= (sum > MAXPOS) ? MAXPOS[W-1:0] : sum[W-1:0];
  end
endmodule
