// seq_detector: sequence detector for the words START and STOP.
//
// The symbol stream is written into the input FIFO (sym_fifo, 16 x 8 bits)
// by the data enable ed. When the FIFO is half full, the detector FSM
// (seq_fsm) starts and reads one symbol per clock from the FIFO head. Words
// are separated by the zero byte. For each word the FSM ends in its final
// state (ok = 1 for one cycle, with strt or stop naming the word) or in its
// error state (err = 1 until the next zero byte).
// start (synchronous) re-initialises the pointers and the FSM; rst is an
// asynchronous active-high reset. The writer must keep its average rate
// below the FSM's (n + 2 cycles for a word of n letters plus separator) so
// the FIFO neither overflows nor, once started, stays empty for long; an
// empty FIFO only stalls the FSM.
// Ports and structure follow the original detector; see sym_fifo and
// seq_fsm for the points that are this design's own.
module seq_detector
  import cddf_pkg::*;
#(
  parameter int unsigned DEPTH      = 16,
  parameter int unsigned FULL_LEVEL = 8
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  logic ed,
  input  sym_t di,
  output logic strt,
  output logic stop,
  output logic ok,
  output logic err
);

  sym_t symb;
  logic full, empty, ipr;

  sym_fifo #(.DEPTH(DEPTH), .W($bits(sym_t)), .FULL_LEVEL(FULL_LEVEL)) u_fifo (
    .clk(clk), .rst(rst), .clr(start), .ed(ed), .di(di), .ipr(ipr),
    .symb(symb), .full(full), .empty(empty)
  );

  seq_fsm u_fsm (
    .clk(clk), .rst(rst), .start(start), .full(full), .empty(empty),
    .symb(symb), .ipr(ipr), .strt(strt), .stop(stop), .ok(ok), .err(err)
  );

endmodule
