// product_encoder: convolutional product encoder for an N x N data matrix.
//
// Step 1 (rows): N rsc_encoder blocks encode the N rows in parallel, one
// column per clock, giving the N x 2N row-coded matrix whose row r reads
// d1 p1 d2 p2 ... dN pN. Step 2 (columns): 2N rsc_encoder blocks encode the
// 2N columns of that matrix in parallel, one row per clock; column c of the
// 2N x 2N result reads d1 p1 ... dN pN of the column code downwards (row 2i
// holds data position i, row 2i+1 its parity). No termination bits are
// added, so the overall rate is 1/4.
//
// Interface: present data (data[r][c] = bit of row r, column c) and pulse
// start while busy is low; data is copied on the start edge. code[r][c]
// holds the codeword when done pulses and keeps it until the next start.
// Timing: done is set 2N+1 edges after the start edge inclusive (one copy
// edge, N row steps, N column steps).
// The encoder is on the transmit side of the decoder built here; the order
// rows-then-columns follows the source design, the serial schedule and the
// placement of the parity rows are this design's choices.
module product_encoder #(
  parameter int unsigned N = 5
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [N-1:0]     data [N],
  output logic             busy,
  output logic             done,
  output logic [2*N-1:0]   code [2*N]
);
  localparam int unsigned CW = $clog2(N + 1);

  typedef enum logic [1:0] {E_IDLE, E_ROW, E_COL} estate_e;

  estate_e          state;
  logic [CW-1:0]    cnt;
  logic [N-1:0]     dq   [N];
  logic [2*N-1:0]   rows [N];
  logic             clr;
  logic [N-1:0]     row_in, row_d, row_p;
  logic [2*N-1:0]   col_in, col_d, col_p;

  assign busy = (state != E_IDLE);
  assign clr  = (state == E_IDLE) && start;

  always_comb begin
    for (int r = 0; r < int'(N); r++) row_in[r] = dq[r][cnt];
    for (int c = 0; c < 2*int'(N); c++) col_in[c] = rows[cnt][c];
  end

  for (genvar r = 0; r < N; r++) begin : g_row
    rsc_encoder u_enc (
      .clk, .rst, .clr, .en(state == E_ROW), .d(row_in[r]),
      .out_d(row_d[r]), .out_p(row_p[r]), .state()
    );
  end

  for (genvar c = 0; c < 2*N; c++) begin : g_col
    rsc_encoder u_enc (
      .clk, .rst, .clr, .en(state == E_COL), .d(col_in[c]),
      .out_d(col_d[c]), .out_p(col_p[c]), .state()
    );
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state <= E_IDLE;
      cnt   <= '0;
      done  <= 1'b0;
      for (int r = 0; r < int'(N); r++) begin
        dq[r]   <= '0;
        rows[r] <= '0;
      end
      for (int r = 0; r < 2*int'(N); r++) code[r] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        E_IDLE: if (start) begin
          dq    <= data;
          cnt   <= '0;
          state <= E_ROW;
        end
        E_ROW: begin
          for (int r = 0; r < int'(N); r++) begin
            rows[r][2*cnt]   <= row_d[r];
            rows[r][2*cnt+1] <= row_p[r];
          end
          if (cnt == CW'(N - 1)) begin
            cnt   <= '0;
            state <= E_COL;
          end else begin
            cnt <= cnt + CW'(1);
          end
        end
        E_COL: begin
          for (int c = 0; c < 2*int'(N); c++) begin
            code[2*cnt][c]   <= col_d[c];
            code[2*cnt+1][c] <= col_p[c];
          end
          if (cnt == CW'(N - 1)) begin
            state <= E_IDLE;
            done  <= 1'b1;
          end else begin
            cnt <= cnt + CW'(1);
          end
        end
        default: state <= E_IDLE;
      endcase
    end
  end
endmodule
