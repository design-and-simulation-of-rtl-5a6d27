// survivor_memory: dual-port store of the ACS decision words.
//
// One word holds the NS = 256 decision bits of one trellis step; the depth is
// twice the traceback length (2 x 32 = 64 words). As described for this
// memory, the write port is synchronous and the read port asynchronous, so the
// traceback reads a word in the same cycle it presents the address, while new
// decisions are written at another address.
//
// The memory has no reset: every word is written before it is read.
module survivor_memory #(
  parameter int unsigned WIDTH = 256,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned A_W  = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [A_W-1:0]   waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [A_W-1:0]   raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
