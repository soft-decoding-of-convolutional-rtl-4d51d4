// tb_product_encoder: encodes the 5x5 example matrix and random matrices
// and compares the 10x10 codeword with the reference row-then-column
// encoder; checks the 2N+1 cycle latency and that busy covers it.
`timescale 1ns/1ps
module tb_product_encoder;
  import cpc_ref_pkg::*;
  localparam int N = 5;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic           start, busy, done;
  logic [N-1:0]   data [N];
  logic [2*N-1:0] code [2*N];

  product_encoder dut (.clk, .rst, .start, .data, .busy, .done, .code);

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  initial begin
    bit ex [25] = '{1,1,1,1,1, 0,0,0,1,0, 1,0,0,1,1, 1,0,0,0,0, 0,0,0,1,1};
    bit d [], rc [];
    start = 0;
    foreach (data[i]) data[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int t = 0; t < 200; t++) begin
      int lat;
      d = new[N*N];
      foreach (d[i]) d[i] = (t == 0) ? ex[i] : 1'($urandom);
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) data[r][c] = d[r*N + c];
      product_encode(N, d, rc);
      @(negedge clk) start = 1'b1;
      @(posedge clk); lat = 1;
      @(negedge clk) start = 1'b0;
      foreach (data[i]) data[i] = N'($urandom);   // copied on the start edge
      while (!done) begin
        @(posedge clk); lat++;
        if (!done) check(busy || lat == 2*N + 2, "busy while encoding");
      end
      lat--;
      check(lat == 2*N + 1, $sformatf("latency %0d", lat));
      for (int r = 0; r < 2*N; r++)
        for (int c = 0; c < 2*N; c++)
          check(code[r][c] === 1'(rc[r*2*N + c]), $sformatf("t=%0d code[%0d][%0d]", t, r, c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
