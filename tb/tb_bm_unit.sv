// tb_bm_unit: drives random samples, a priori values and K into the branch
// metric unit with the enable high for three edges, then checks all eight
// metrics against BM[m][u] = K*(y*xd + yp*xp) +/- apr/2 (reference model,
// rounded and clipped to +/-8000), and checks that they hold while the
// enable is low and the inputs change. Includes samples that saturate.
`timescale 1ns/1ps
module tb_bm_unit;
  import cpc_pkg::*;
  import cpc_ref_pkg::*;
  localparam int W = 14;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic                en;
  logic signed [W-1:0] y, yp, apr;
  logic [KW-1:0]       k;
  logic signed [W-1:0] bm [8];

  bm_unit dut (.clk, .rst, .en, .y, .yp, .apr, .k, .bm);

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; y = '0; yp = '0; apr = '0; k = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int t = 0; t < 500; t++) begin
      int vy, vyp, va, vk;
      if (t % 8 == 7) begin
        vy  = $urandom_range(0, 16383) - 8192;
        vyp = $urandom_range(0, 16383) - 8192;
      end else begin
        vy  = $urandom_range(0, 60) - 30;
        vyp = $urandom_range(0, 60) - 30;
      end
      va = $urandom_range(0, 4000) - 2000;
      vk = $urandom_range(0, 65535);
      @(negedge clk);
      y = W'(vy); yp = W'(vyp); apr = W'(va); k = KW'(vk); en = 1'b1;
      repeat (3) @(negedge clk);
      en = 1'b0;
      y = W'($urandom); yp = W'($urandom); apr = W'($urandom);
      repeat (2) @(negedge clk);
      for (int m = 0; m < 4; m++)
        for (int u = 0; u < 2; u++) begin
          int e;
          e = bmet(vy, vyp, va, vk, m, u, 8000);
          checks++;
          if (bm[2*m+u] !== W'(e)) begin
            failures++;
            $display("FAIL t=%0d bm[%0d][%0d]=%0d exp %0d", t, m, u, bm[2*m+u], e);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
