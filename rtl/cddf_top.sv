// cddf_top: the two example datapaths side by side, sharing clock and reset.
//
//   det_*  the sequence detector for the words START and STOP
//          (seq_detector: 16-symbol input FIFO + detector FSM)
//   lzw_*  the LZW decompressor with 12-bit codes (lzw_decompressor)
// The two designs are independent: they only share clk and the
// asynchronous, active-high rst. Each has its own synchronous start that
// re-initialises it for a new stream. See the two modules for interfaces
// and timing.
module cddf_top
  import cddf_pkg::*;
#(
  parameter int unsigned DET_DEPTH      = 16,
  parameter int unsigned DET_FULL_LEVEL = 8,
  parameter int unsigned LZW_CODE_W     = 12,
  parameter int unsigned LZW_SYM_W      = 8
) (
  input  logic                  clk,
  input  logic                  rst,
  // sequence detector
  input  logic                  det_start,
  input  logic                  det_ed,
  input  sym_t                  det_di,
  output logic                  det_strt,
  output logic                  det_stop,
  output logic                  det_ok,
  output logic                  det_err,
  // LZW decompressor
  input  logic                  lzw_start,
  input  logic                  lzw_in_valid,
  output logic                  lzw_in_ready,
  input  logic [LZW_CODE_W-1:0] lzw_in_code,
  output logic                  lzw_out_valid,
  input  logic                  lzw_out_ready,
  output logic [LZW_SYM_W-1:0]  lzw_out_sym,
  output logic                  lzw_dict_full
);

  seq_detector #(.DEPTH(DET_DEPTH), .FULL_LEVEL(DET_FULL_LEVEL)) u_det (
    .clk(clk), .rst(rst), .start(det_start), .ed(det_ed), .di(det_di),
    .strt(det_strt), .stop(det_stop), .ok(det_ok), .err(det_err)
  );

  lzw_decompressor #(.CODE_W(LZW_CODE_W), .SYM_W(LZW_SYM_W)) u_lzw (
    .clk(clk), .rst(rst), .start(lzw_start),
    .in_valid(lzw_in_valid), .in_ready(lzw_in_ready), .in_code(lzw_in_code),
    .out_valid(lzw_out_valid), .out_ready(lzw_out_ready), .out_sym(lzw_out_sym),
    .dict_full(lzw_dict_full)
  );

endmodule
