// cpc_pkg: shared constants, types and small functions of the convolutional
// product decoder.
//
// Number format: every soft value (channel sample, branch metric, state
// metric, log-likelihood) is a signed two's-complement integer that counts
// tenths, i.e. the real value multiplied by 10 (one decimal digit kept to
// the right of the point). With the default 14-bit word the usable range is
// clipped to +/-8000 (+/-800.0) and "log(0)" is represented by -8000.
//
// The code is the rate-1/2 (1, 5/7) recursive systematic convolutional code,
// feedback 1+D+D^2, feed-forward 1+D^2. A state is the two-bit register
// content s1 s2 (s1 = newest) read as the number 2*s1+s2. From state m with
// input bit u the next state and the parity bit are given by next_state()
// and parity_bit() below; the data bit of a branch equals u (systematic).
//
// The max* correction ln(1+exp(-|a-b|)) comes from an 8-entry table with a
// step of one LSB (0.1): entry i = round(10*ln(1+exp(-i/10))), zero beyond.
package cpc_pkg;

  // Default word length of the received data and of all stored metrics.
  localparam int unsigned W_DEFAULT   = 14;
  // Saturation limit and "minus infinity" in tenths (+/-800.0).
  localparam int          SAT_DEFAULT = 8000;
  // Fractional bits of the channel reliability factor K = 1/sigma^2.
  localparam int unsigned KF = 10;
  localparam int unsigned KW = 16;


  // Next state for state m and input bit u (trellis of the (1,5/7) code).
  function automatic logic [1:0] next_state(input logic [1:0] m, input logic u);
    logic a;
    a = u ^ m[1] ^ m[0];       // feedback node
    return {a, m[1]};
  endfunction

  // Parity output for state m and input bit u.
  function automatic logic parity_bit(input logic [1:0] m, input logic u);
    logic a;
    a = u ^ m[1] ^ m[0];
    return a ^ m[0];
  endfunction

  // Correction term of max*, in tenths, indexed by |a-b| in tenths.
  function automatic logic [2:0] maxstar_corr(input logic [31:0] diff_abs);
    logic [2:0] c;
    case (diff_abs)
      32'd0:                   c = 3'd7;
      32'd1, 32'd2, 32'd3:     c = 3'd6;
      32'd4, 32'd5:            c = 3'd5;
      32'd6, 32'd7:            c = 3'd4;
      default:                 c = 3'd0;
    endcase
    return c;
  endfunction

endpackage
