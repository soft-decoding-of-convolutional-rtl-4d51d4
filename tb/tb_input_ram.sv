// tb_input_ram: fills the received-data RAM with random words, reads every
// address back (data one cycle after the address), then overwrites a random
// subset and reads again, comparing with a shadow array.
`timescale 1ns/1ps
module tb_input_ram;
  localparam int DEPTH = 100;
  localparam int W = 14;
  localparam int AW = $clog2(DEPTH);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          we;
  logic [AW-1:0] addr;
  logic [W-1:0]  din, dout;
  logic [W-1:0]  shadow [DEPTH];

  input_ram dut (.clk, .we, .addr, .din, .dout);

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_all();
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1'b0; addr = AW'(i);
      @(negedge clk);
      checks++;
      if (dout !== shadow[i]) begin
        failures++;
        $display("FAIL addr %0d: %0h exp %0h", i, dout, shadow[i]);
      end
    end
  endtask

  initial begin
    we = 0; addr = '0; din = '0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1'b1; addr = AW'(i); din = W'($urandom); shadow[i] = din;
    end
    read_all();
    for (int j = 0; j < 40; j++) begin
      int a;
      a = $urandom_range(0, DEPTH - 1);
      @(negedge clk);
      we = 1'b1; addr = AW'(a); din = W'($urandom); shadow[a] = din;
    end
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
