// rsc_encoder: bit-serial encoder of the rate-1/2 (1, 5/7) recursive
// systematic convolutional code.
//
// Two delay elements s1 (newest) and s2. The feedback node is
// a = d ^ s1 ^ s2 (feedback polynomial 7 = 1+D+D^2), the parity output is
// p = a ^ s2 (feed-forward polynomial 5 = 1+D^2) and the systematic output is
// d itself. On every clock with en high the registers shift: s1 <= a,
// s2 <= s1. clr returns the encoder to state 00 (synchronous, has priority).
//
// Interface: d is the input bit, out_d/out_p the code bits of the current
// step (combinational from d and the state, as in the encoder diagram).
// state = {s1, s2} is brought out; it equals the trellis state number used
// by the decoder. Reset is asynchronous, active high.
module rsc_encoder (
  input  logic       clk,
  input  logic       rst,
  input  logic       clr,
  input  logic       en,
  input  logic       d,
  output logic       out_d,
  output logic       out_p,
  output logic [1:0] state
);
  logic s1, s2, a;

  assign a     = d ^ s1 ^ s2;
  assign out_d = d;
  assign out_p = a ^ s2;
  assign state = {s1, s2};

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      s1 <= 1'b0;
      s2 <= 1'b0;
    end else if (clr) begin
      s1 <= 1'b0;
      s2 <= 1'b0;
    end else if (en) begin
      s1 <= a;
      s2 <= s1;
    end
  end
endmodule
