// bc1_sram: the small per-channel memory of the first baseline correction
// (1024 words of 10 bits in the document).
//
// Single port, synchronous: on a clock edge with we set, wdata is written at
// addr; with re set, the word at addr is read and appears on rdata after
// that edge (one-clock read latency, read-before-write on the same address).
// rdata holds its value while re is low. Written as a plain array so that a
// memory compiler macro can replace it; contents are not reset.
module bc1_sram #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 10
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    if (re) rdata <= mem[addr];
  end
endmodule
