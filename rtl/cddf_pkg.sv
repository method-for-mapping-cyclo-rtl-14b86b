// cddf_pkg: types and constants shared by the sequence detector blocks.
//
// The detector reads 8-bit characters. The empty symbol (epsilon) that
// separates words is the zero byte; the letters are their ASCII codes,
// as in the detector's comparisons symb = character'pos('S') etc.
// The state names follow the detector's state diagram: S1 waits for the
// input FIFO to fill, S waits for the first letter of a word, A..D, G walk
// through "START", H, K through "STOP", E is the error state and R the
// final (recognised) state.
package cddf_pkg;

  typedef logic [7:0] sym_t;

  localparam sym_t SYM_EPS = 8'h00;
  localparam sym_t SYM_S   = 8'h53;  // 'S'
  localparam sym_t SYM_T   = 8'h54;  // 'T'
  localparam sym_t SYM_A   = 8'h41;  // 'A'
  localparam sym_t SYM_R   = 8'h52;  // 'R'
  localparam sym_t SYM_O   = 8'h4F;  // 'O'
  localparam sym_t SYM_P   = 8'h50;  // 'P'

  typedef enum logic [3:0] {
    ST_S1 = 4'd0,  // started, waiting for the FIFO to be half full
    ST_S  = 4'd1,  // initial state: waiting for a word
    ST_A  = 4'd2,  // "S" seen
    ST_B  = 4'd3,  // "ST" seen
    ST_C  = 4'd4,  // "STA" seen
    ST_D  = 4'd5,  // "STAR" seen
    ST_G  = 4'd6,  // "START" seen, epsilon expected
    ST_H  = 4'd7,  // "STO" seen
    ST_K  = 4'd8,  // "STOP" seen, epsilon expected
    ST_E  = 4'd9,  // error: word not in the language
    ST_R  = 4'd10  // final state: a word was recognised
  } det_state_e;

endpackage
