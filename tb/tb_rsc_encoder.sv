// tb_rsc_encoder: checks the (1, 5/7) encoder. The 5-bit block 10101 must
// give the code sequence 11 01 10 01 11 and end in state 00; random
// sequences are compared step by step with the trellis of the reference
// model (parity bit and next state); clr and en are exercised.
`timescale 1ns/1ps
module tb_rsc_encoder;
  import cpc_ref_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic clr, en, d, out_d, out_p;
  logic [1:0] state;

  rsc_encoder dut (.clk, .rst, .clr, .en, .d, .out_d, .out_p, .state);

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
    bit ex [5] = '{1, 0, 1, 0, 1};
    bit exp_code [10] = '{1, 1, 0, 1, 1, 0, 0, 1, 1, 1};
    int st;
    clr = 0; en = 0; d = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < 5; i++) begin
      @(negedge clk);
      d = ex[i]; en = 1'b1;
      #1;
      check(out_d === 1'(exp_code[2*i]) && out_p === 1'(exp_code[2*i+1]), $sformatf("example step %0d", i));
    end
    @(negedge clk) en = 1'b0;
    check(state === 2'b00, "example ends in state 00");
    // random sequences with hold cycles and clears
    st = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      d = 1'($urandom);
      en = ($urandom_range(0, 3) != 0);
      clr = ($urandom_range(0, 50) == 0);
      #1;
      check(state === 2'(st), $sformatf("state %0d exp %0d", state, st));
      check(out_p === 1'(par(st, d)) && out_d === d, "parity/data output");
      if (clr) st = 0;
      else if (en) st = nxt(st, d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
