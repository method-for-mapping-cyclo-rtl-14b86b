// lzw_decompressor: LZW decoder with fixed-width codes, mapped as a
// cyclo-dynamic dataflow: the number of clock cycles spent on a code
// depends on the length of the string it stands for.
//
// Codes 0..255 are single symbols; codes 256..2**CODE_W-1 are dictionary
// entries, each stored as (prefix code, last symbol). Each new code after
// the first adds the entry (previous code, first symbol of the current
// string) at the next free code until the dictionary is full, after which
// it is frozen. The special case of a code equal to the next free code
// (the string is the previous string followed by its own first symbol) is
// handled by pushing that first symbol before walking the previous code.
//
// Structure: a dictionary RAM (cddf_ram_sync, 2**CODE_W x (CODE_W + 8)
// bits, registered read); a symbol RAM of 2**CODE_W x 8 bits used as two
// last-in first-out stacks growing towards each other (side 0 from the
// bottom, side 1 from the top; its read register is the output register);
// and two FSMs that run concurrently:
//   walker  IDLE: accept a code (in_valid / in_ready) on the free side;
//           WALK: follow the prefix chain, one dictionary read and one push
//           per cycle, from the last symbol back to the root symbol; then
//           mark the side as holding a complete string and go on with the
//           next code on the other side.
//   popper  pops the complete strings in order, alternating sides, one
//           symbol per cycle into the output register (out_valid /
//           out_ready).
// So code k+1 is walked while code k is popped. A push that would meet the
// other side's stack waits until the popper has made room.
// Timing: with the output always ready, a code of L symbols occupies the
// walker for L + 1 cycles (L for the special case) and the popper for L
// cycles; in a steady stream the decoder delivers L symbols every L + 1
// cycles. The first symbol of a code appears two cycles after its walk
// ends.
// start (synchronous) clears the dictionary state and both stacks for a
// new stream; rst is asynchronous. Precondition: the first code of a
// stream is a symbol and each later code is at most the next free code.
// The algorithm is standard LZW, and two FSMs sharing RAM buffers follow
// the decoder's published outline; the code width, the handshakes and the
// two-ended stack are this design's choices.
module lzw_decompressor #(
  parameter int unsigned CODE_W = 12,
  parameter int unsigned SYM_W  = 8,
  localparam int unsigned DICT_SIZE = 2 ** CODE_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [CODE_W-1:0] in_code,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [SYM_W-1:0]  out_sym,
  output logic              dict_full
);

  localparam logic [CODE_W-1:0] FIRST_FREE = CODE_W'(2 ** SYM_W);
  localparam logic [CODE_W-1:0] LAST_CODE  = CODE_W'(DICT_SIZE - 1);

  typedef enum logic {W_IDLE, W_WALK} walk_state_e;

  // walker
  walk_state_e       wst;
  logic              wside;      // stack side the walker fills
  logic [CODE_W-1:0] cur;        // code whose last symbol is pushed next
  logic [CODE_W-1:0] code_q;     // code being decoded
  logic [CODE_W-1:0] prev_code;  // previous code of the stream
  logic [SYM_W-1:0]  prev_first; // first symbol of the previous string
  logic              has_prev;
  logic [CODE_W-1:0] next_code;  // next free dictionary code
  logic              dict_end;   // every code has been assigned

  // stacks and popper
  logic [CODE_W:0]   sp [2];     // symbols held on each side
  logic [1:0]        done_q;     // side holds a complete string
  logic              pside;      // side the popper empties next

  // dictionary RAM
  logic                     d_we, d_re;
  logic [CODE_W-1:0]        d_waddr, d_raddr;
  logic [CODE_W+SYM_W-1:0]  d_wdata, d_rdata;
  logic [CODE_W-1:0]        d_prefix;
  logic [SYM_W-1:0]         d_sym;

  // symbol RAM
  logic               s_we;
  logic [CODE_W-1:0]  s_waddr, s_raddr;
  logic [SYM_W-1:0]   s_wdata;

  logic accept, kwk, literal, room, step, push, pop_fire, add_entry;

  assign {d_prefix, d_sym} = d_rdata;
  assign literal   = (cur < FIRST_FREE);
  assign dict_full = dict_end;

  // a push may not meet the other side's stack
  assign room      = (32'(sp[0]) + 32'(sp[1])) < DICT_SIZE;
  assign in_ready  = (wst == W_IDLE) && !done_q[wside] && room && !start;
  assign accept    = in_valid && in_ready;
  // special case: the code is the one about to be assigned
  assign kwk       = has_prev && !dict_end && (in_code == next_code);
  assign step      = (wst == W_WALK) && room;
  assign push      = step || (accept && kwk);
  // the walk ends at a literal root: the string is complete
  assign add_entry = step && literal && has_prev && !dict_end;
  assign pop_fire  = done_q[pside] && (!out_valid || out_ready) && !start;

  // dictionary: written when a walk ends, read along the prefix chain;
  // while a step waits for room the read register holds its word
  always_comb begin
    d_re    = 1'b0;
    d_raddr = d_prefix;
    if (accept) begin
      d_re    = 1'b1;
      d_raddr = kwk ? prev_code : in_code;
    end else if (step && !literal) begin
      d_re    = 1'b1;
    end
  end
  assign d_we    = add_entry;
  assign d_waddr = next_code;
  assign d_wdata = {prev_code, SYM_W'(cur)};

  cddf_ram_sync #(.DEPTH(DICT_SIZE), .W(CODE_W + SYM_W)) u_dict (
    .clk(clk), .we(d_we), .waddr(d_waddr), .wdata(d_wdata),
    .re(d_re), .raddr(d_raddr), .rdata(d_rdata)
  );

  // symbol RAM: side 0 fills upwards from 0, side 1 downwards from the top
  assign s_we    = push && !start;
  assign s_wdata = (accept && kwk) ? prev_first : (literal ? SYM_W'(cur) : d_sym);
  assign s_waddr = wside ? CODE_W'(LAST_CODE - sp[1][CODE_W-1:0])
                         : sp[0][CODE_W-1:0];
  assign s_raddr = pside ? CODE_W'(DICT_SIZE - 32'(sp[1]))
                         : CODE_W'(sp[0] - 1'b1);

  cddf_ram_sync #(.DEPTH(DICT_SIZE), .W(SYM_W)) u_stack (
    .clk(clk), .we(s_we), .waddr(s_waddr), .wdata(s_wdata),
    .re(pop_fire), .raddr(s_raddr), .rdata(out_sym)
  );

  // walker FSM
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      wst        <= W_IDLE;
      wside      <= 1'b0;
      cur        <= '0;
      code_q     <= '0;
      prev_code  <= '0;
      prev_first <= '0;
      has_prev   <= 1'b0;
      next_code  <= FIRST_FREE;
      dict_end   <= 1'b0;
    end else if (start) begin
      wst       <= W_IDLE;
      wside     <= 1'b0;
      has_prev  <= 1'b0;
      next_code <= FIRST_FREE;
      dict_end  <= 1'b0;
    end else begin
      case (wst)
        W_IDLE: if (accept) begin
          code_q <= in_code;
          cur    <= kwk ? prev_code : in_code;
          wst    <= W_WALK;
        end
        W_WALK: if (step) begin
          if (literal) begin
            wst        <= W_IDLE;
            wside      <= !wside;
            prev_code  <= code_q;
            prev_first <= SYM_W'(cur);
            has_prev   <= 1'b1;
            if (add_entry) begin
              if (next_code == LAST_CODE) dict_end <= 1'b1;
              else                        next_code <= next_code + 1'b1;
            end
          end else begin
            cur <= d_prefix;
          end
        end
        default: wst <= W_IDLE;
      endcase
    end
  end

  // stack pointers, complete-string flags and popper FSM
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sp[0]     <= '0;
      sp[1]     <= '0;
      done_q    <= '0;
      pside     <= 1'b0;
      out_valid <= 1'b0;
    end else if (start) begin
      sp[0]     <= '0;
      sp[1]     <= '0;
      done_q    <= '0;
      pside     <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      if (out_ready) out_valid <= 1'b0;
      // the walker and the popper never work on the same side
      if (push) sp[wside] <= sp[wside] + 1'b1;
      if (step && literal) done_q[wside] <= 1'b1;
      if (pop_fire) begin
        sp[pside] <= sp[pside] - 1'b1;
        out_valid <= 1'b1;
        if (sp[pside] == 1) begin
          done_q[pside] <= 1'b0;
          pside         <= !pside;
        end
      end
    end
  end

  a_code_defined: assert property (@(posedge clk) disable iff (rst)
    (accept && has_prev) |-> (in_code <= next_code || dict_end))
    else $error("lzw_decompressor: code beyond the next free code");
  a_first_literal: assert property (@(posedge clk) disable iff (rst)
    (accept && !has_prev) |-> (in_code < FIRST_FREE))
    else $error("lzw_decompressor: first code of a stream is not a symbol");
  a_sides_apart: assert property (@(posedge clk) disable iff (rst)
    !(push && pop_fire && wside == pside))
    else $error("lzw_decompressor: walker and popper on the same side");

endmodule
