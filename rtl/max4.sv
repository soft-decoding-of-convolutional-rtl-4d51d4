// max4: max* of four values built as a balanced tree of three max2 blocks.
//
// max4(a,b,c,d) = max2(max2(a,b), max2(c,d)). The balanced form is the one
// the source design adopts because it needs two clock cycles instead of the
// three of the chained form max2(max2(max2(a,b),c),d).
//
// Interface: four signed W-bit operands, one signed W-bit result.
// Timing: two clock cycles of latency (each max2 is registered), fully
// pipelined. Reset is asynchronous, active high.
module max4 #(
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  input  logic signed [W-1:0] c,
  input  logic signed [W-1:0] d,
  output logic signed [W-1:0] y
);
  logic signed [W-1:0] ab, cd;

  max2 #(.W(W)) u_ab  (.clk, .rst, .a(a),  .b(b),  .y(ab));
  max2 #(.W(W)) u_cd  (.clk, .rst, .a(c),  .b(d),  .y(cd));
  max2 #(.W(W)) u_out (.clk, .rst, .a(ab), .b(cd), .y(y));
endmodule
