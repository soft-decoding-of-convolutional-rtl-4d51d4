// tb_max4: streams random operand sets into the max4 tree and checks each
// result two cycles later against max*(max*(a,b), max*(c,d)) of the
// reference model, including sets whose values lie within the correction
// table's range of one another.
`timescale 1ns/1ps
module tb_max4;
  import cpc_ref_pkg::*;
  localparam int W = 16;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic signed [W-1:0] a, b, c, d, y;
  max4 #(.W(W)) dut (.clk, .rst, .a, .b, .c, .d, .y);

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_q [$];
    a = '0; b = '0; c = '0; d = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int t = 0; t < 3000; t++) begin
      int v [4], base;
      @(negedge clk);
      if (exp_q.size() == 2) begin
        int e;
        e = exp_q.pop_front();
        checks++;
        if (y !== W'(e)) begin
          failures++;
          $display("FAIL t=%0d y=%0d exp=%0d", t, y, e);
        end
      end
      base = $urandom_range(0, 20000) - 10000;
      foreach (v[i]) v[i] = (t % 2) ? base + $urandom_range(0, 16) - 8
                                    : $urandom_range(0, 30000) - 15000;
      a = W'(v[0]); b = W'(v[1]); c = W'(v[2]); d = W'(v[3]);
      exp_q.push_back(mstar4(v[0], v[1], v[2], v[3], W));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
