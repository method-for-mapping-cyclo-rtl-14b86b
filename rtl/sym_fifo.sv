// sym_fifo: the circular input FIFO of the sequence detector.
//
// A cddf_ram of DEPTH symbols with two cddf_counter pointers: the write
// pointer pw (advanced by ed, the data enable, together with the write of
// di into BUF[pw]) and the read pointer pr (advanced by ipr, the FSM's read
// request). symb = BUF[pr] is the symbol at the head of the FIFO,
// combinationally. full is high while the fill level pw - pr (modulo DEPTH)
// is at least FULL_LEVEL, half the buffer by default; it is the control
// token that starts the detector FSM. empty is high when pw = pr.
// rst (asynchronous) and clr (synchronous, the START input) set both
// pointers to zero; a write in the cycle of clr is dropped.
// The writer has no back-pressure: it must not run more than DEPTH-1
// symbols ahead of the reader, which the periodic input of the original
// design guarantees. The assertion below reports an overrun in simulation.
// Sizes, pointers and the full condition follow the original design; empty, clr
// and the dropped write on clr are this design's choices.
module sym_fifo #(
  parameter int unsigned DEPTH      = 16,
  parameter int unsigned W          = 8,
  parameter int unsigned FULL_LEVEL = 8,
  localparam int unsigned AW        = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clr,
  input  logic         ed,
  input  logic [W-1:0] di,
  input  logic         ipr,
  output logic [W-1:0] symb,
  output logic         full,
  output logic         empty
);

  logic [AW-1:0] pw, pr, pw_inc, pr_inc, level;
  logic          wr;

  assign wr = ed && !clr;

  cddf_counter #(.W(AW)) u_pw (
    .clk(clk), .rst(rst), .init(clr), .en(ed), .cnt(pw), .inc(pw_inc)
  );

  cddf_counter #(.W(AW)) u_pr (
    .clk(clk), .rst(rst), .init(clr), .en(ipr), .cnt(pr), .inc(pr_inc)
  );

  cddf_ram #(.DEPTH(DEPTH), .W(W)) u_buf (
    .clk(clk), .we(wr), .waddr(pw), .wdata(di), .raddr(pr), .rdata(symb)
  );

  assign level = pw - pr;
  assign full  = (32'(level) >= FULL_LEVEL);
  assign empty = (pw == pr);

  // The pointers are used from their registers; of the incrementer taps
  // only pw_inc is used, by this overrun check.
  a_no_overrun: assert property (@(posedge clk) disable iff (rst)
    (wr && !ipr) |-> (pw_inc != pr))
    else $error("sym_fifo: write overran the read pointer");

  // pr_inc is not needed by the FIFO logic
  logic unused_pr_inc;
  assign unused_pr_inc = ^pr_inc;

endmodule
