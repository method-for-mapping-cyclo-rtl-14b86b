// seq_fsm: FSM of the sequence detector for the words START and STOP.
//
// It recognises the language G = START + STOP = ST(ART + OP) in a stream of
// 8-bit symbols in which the zero byte (epsilon) separates words. Its
// next-state node NS takes the FIFO head symb, the FIFO flags and START;
// the state register ST holds one of the states of cddf_pkg::det_state_e;
// its output node OS gives the FIFO read request ipr and the flags.
//
// Operation, one symbol per clock:
//   S1  after reset or start; waits for full (FIFO half full), then goes to S
//       without reading.
//   S   reads a symbol: epsilon stays in S, 'S' goes to A, anything else to E.
//   A..D, G, H, K follow S-T-A-R-T and S-T-O-P; a wrong letter goes to E.
//       A separator that ends the word early also goes to E but is not
//       read, so that E consumes it and the following word stays intact.
//   G / K  on epsilon go to R and raise strt / stop; on anything else to E.
//   E   (err = 1) reads and drops symbols until epsilon, then goes to S.
//   R   (ok = 1) the final state; it reads nothing and goes to S next cycle.
// Every state other than S1 and R reads exactly one symbol per cycle
// (ipr = 1) provided the FIFO is not empty; when it is empty the FSM holds
// its state. start has priority and returns the FSM to S1.
// Timing: a recognised word of n letters and its epsilon take n + 2 cycles
// (n + 1 reads and one R cycle); a wrong word takes one cycle per symbol,
// plus one if it ends early. ok is high in R; strt or stop is high in that
// same cycle and tells which word was found. err is high while in E.
// Transitions follow the original state diagram; the contents of E and R,
// the stall on an empty FIFO, the priority of start, and G/K going to E on
// a wrong symbol are this design's reading of the text.
module seq_fsm
  import cddf_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  logic full,
  input  logic empty,
  input  sym_t symb,
  output logic ipr,
  output logic strt,
  output logic stop,
  output logic ok,
  output logic err
);

  det_state_e st, st_n;
  logic       strt_n, stop_n;

  always_comb begin
    st_n   = st;
    ipr    = 1'b0;
    strt_n = 1'b0;
    stop_n = 1'b0;
    if (start) begin
      st_n = ST_S1;
    end else begin
      case (st)
        ST_S1: if (full) st_n = ST_S;
        ST_R:  st_n = ST_S;
        default: begin
          if (!empty) begin
            ipr = 1'b1;
            // a word that ends early: go to E, but leave the separator in
            // the FIFO so that E consumes it and the next word is intact
            if (symb == SYM_EPS && st inside {ST_A, ST_B, ST_C, ST_D, ST_H})
              ipr = 1'b0;
            case (st)
              ST_S: if (symb == SYM_EPS)    st_n = ST_S;
                    else if (symb == SYM_S) st_n = ST_A;
                    else                    st_n = ST_E;
              ST_A: st_n = (symb == SYM_T) ? ST_B : ST_E;
              ST_B: if (symb == SYM_A)      st_n = ST_C;
                    else if (symb == SYM_O) st_n = ST_H;
                    else                    st_n = ST_E;
              ST_C: st_n = (symb == SYM_R) ? ST_D : ST_E;
              ST_D: st_n = (symb == SYM_T) ? ST_G : ST_E;
              ST_G: if (symb == SYM_EPS) begin
                      st_n   = ST_R;
                      strt_n = 1'b1;
                    end else st_n = ST_E;
              ST_H: st_n = (symb == SYM_P) ? ST_K : ST_E;
              ST_K: if (symb == SYM_EPS) begin
                      st_n   = ST_R;
                      stop_n = 1'b1;
                    end else st_n = ST_E;
              ST_E: st_n = (symb == SYM_EPS) ? ST_S : ST_E;
              default: st_n = ST_S1;
            endcase
          end
        end
      endcase
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      st   <= ST_S1;
      strt <= 1'b0;
      stop <= 1'b0;
    end else begin
      st   <= st_n;
      strt <= strt_n;
      stop <= stop_n;
    end
  end

  assign ok  = (st == ST_R);
  assign err = (st == ST_E);

  // strt and stop are only ever raised together with the final state.
  a_flag_in_final: assert property (@(posedge clk) disable iff (rst)
    (strt || stop) |-> ok)
    else $error("seq_fsm: word flag outside the final state");

endmodule
