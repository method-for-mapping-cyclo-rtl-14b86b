// cddf_ram_sync: RAM subgraph with a registered read node, as a block RAM
// of an FPGA is built.
//
// MW writes wdata to word waddr at the rising edge when we is high. MR
// reads word raddr at the rising edge when re is high and holds it in the
// output register rdata (one cycle of read latency); when re is low rdata
// keeps its value. A read of the word written in the same cycle returns the
// old contents (read-first). Contents are not reset.
// The read latency and read-first behaviour are this design's choices.
module cddf_ram_sync #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned W     = 8,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
