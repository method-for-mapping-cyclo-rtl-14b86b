// cddf_ram: the RAM subgraph of a cyclo-dynamic dataflow graph.
//
// A write node MW, the storage (a register array of DEPTH words) and a read
// node MR. MW writes wdata to word waddr at the rising clock edge when we
// is high. MR is the read multiplexer: rdata shows word raddr
// combinationally, so the read address register of the block is whatever
// register drives raddr (the read pointer in the detector FIFO). Reading
// a word written in the same cycle gives the old contents.
// The storage is not reset and has no defined power-up contents here:
// users must not read a word before writing it (the detector FIFO never
// does, since it reads only when it is not empty).
// Structure follows the original design; the combinational read port is
// what the detector FIFO needs, whose head symbol is read at the read
// pointer without a clock edge.
module cddf_ram #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned W     = 8,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
