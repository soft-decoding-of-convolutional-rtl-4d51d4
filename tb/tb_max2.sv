// tb_max2: checks the registered max* operator against the reference
// max*(a,b) = max(a,b) + round(10*ln(1+exp(-|a-b|/10))) for |a-b| < 8,
// with one cycle of latency, for operands close together (table region),
// far apart, equal, and at the top of the range (clipping).
`timescale 1ns/1ps
module tb_max2;
  import cpc_ref_pkg::*;
  localparam int W = 16;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic signed [W-1:0] a, b, y;
  max2 #(.W(W)) dut (.clk, .rst, .a, .b, .y);

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ea, eb, exp_prev;
    a = '0; b = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    exp_prev = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      case (t % 4)
        0: begin ea = $urandom_range(0, 20000) - 10000; eb = ea + $urandom_range(0, 20) - 10; end
        1: begin ea = $urandom_range(0, 60000) - 30000; eb = $urandom_range(0, 60000) - 30000; end
        2: begin ea = $urandom_range(0, 2000) - 1000;   eb = ea; end
        default: begin ea = 32767 - $urandom_range(0, 5); eb = ea - $urandom_range(0, 3); end
      endcase
      if (t > 0) begin
        checks++;
        if (y !== W'(exp_prev)) begin
          failures++;
          $display("FAIL t=%0d y=%0d exp=%0d", t, y, exp_prev);
        end
      end
      a = W'(ea); b = W'(eb);
      exp_prev = mstar(ea, eb, W);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
