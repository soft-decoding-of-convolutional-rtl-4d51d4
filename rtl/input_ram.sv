// input_ram: single-port memory holding the received channel matrix.
//
// One read or one write per clock, as a single-port FPGA block RAM: the word
// at addr is written with din when we is high, otherwise it is read and
// appears on dout after the clock edge (one cycle of read latency). The
// memory is written as a plain array so that synthesis maps it to block RAM;
// the source design uses a vendor single-port block-memory core here, whose
// exact port list is not reproduced.
//
// Parameters: DEPTH words of W bits (default 4N^2 = 100 words of 14 bits for
// the N = 5 product decoder). Memory contents are not reset.
module input_ram #(
  parameter int unsigned DEPTH = 100,
  parameter int unsigned W     = cpc_pkg::W_DEFAULT,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  din,
  output logic [W-1:0]  dout
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= din;
    else    dout      <= mem[addr];
  end

  a_addr_range: assert property (@(posedge clk) we |-> (int'(addr) < int'(DEPTH)))
    else $error("input_ram: write address out of range");
endmodule
