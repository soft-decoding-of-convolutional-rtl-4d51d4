// cpc_top: convolutional product codec, the product encoder and the
// iterative product decoder side by side.
//
// The two halves share only clock and reset; in a link the encoder sits at
// the transmitter and the decoder at the receiver, with BPSK modulation and
// the channel between them (outside this design). A host maps the encoder's
// 2N x 2N code bits to soft samples and writes them, word r*2N+c, into the
// decoder's received-data RAM.
//
// Encoder side: enc_start, enc_data -> enc_busy, enc_done, enc_code
// (see product_encoder). Decoder side: ram_we/ram_addr/ram_din, dec_start,
// dec_iters, dec_k -> dec_busy, dec_iter_done, dec_done, dec_o_r, dec_data
// (see conv_product_decoder). Parameters: N (data matrix N x N, default 5)
// and W (soft word length, default 14 bits).
module cpc_top #(
  parameter int unsigned N  = 5,
  parameter int unsigned W  = cpc_pkg::W_DEFAULT,
  parameter int unsigned AW = $clog2(4 * N * N)
) (
  input  logic                    clk,
  input  logic                    rst,
  // encoder
  input  logic                    enc_start,
  input  logic [N-1:0]            enc_data [N],
  output logic                    enc_busy,
  output logic                    enc_done,
  output logic [2*N-1:0]          enc_code [2*N],
  // decoder
  input  logic                    ram_we,
  input  logic [AW-1:0]           ram_addr,
  input  logic signed [W-1:0]     ram_din,
  input  logic                    dec_start,
  input  logic [7:0]              dec_iters,
  input  logic [cpc_pkg::KW-1:0]  dec_k,
  output logic                    dec_busy,
  output logic                    dec_iter_done,
  output logic                    dec_done,
  output logic signed [W-1:0]     dec_o_r  [N][2*N],
  output logic [N-1:0]            dec_data [N]
);
  product_encoder #(.N(N)) u_enc (
    .clk, .rst, .start(enc_start), .data(enc_data),
    .busy(enc_busy), .done(enc_done), .code(enc_code)
  );

  conv_product_decoder #(.N(N), .W(W), .IT_W(8), .AW(AW)) u_dec (
    .clk, .rst, .ram_we, .ram_addr, .ram_din,
    .start(dec_start), .iters(dec_iters), .k_chan(dec_k),
    .busy(dec_busy), .iter_done(dec_iter_done), .done(dec_done),
    .o_r(dec_o_r), .dec_data(dec_data)
  );
endmodule
