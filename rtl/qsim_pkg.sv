// qsim_pkg: shared types, encodings and small helper functions of the
// MULT-CCF coprocessor (constraint check function for x * y = z in the
// qualitative simulator QSIM).
//
// A qualitative value has a magnitude (qmag) and a direction of change
// (qdir). The magnitude is a place in the variable's ordered quantity space
// of landmarks. This design encodes it compactly, so that signs and order
// relations fall out of plain bit tests and comparisons:
//   pos  signed position relative to the landmark zero: 0 is the landmark
//        zero, an even value 2k is the k-th landmark away from zero (the sign
//        gives the side), an odd value is the open interval between the two
//        neighbouring landmarks.
//   inf  set when the landmark is +inf or -inf (pos is then even and the
//        outermost position used on that side).
// Directions and signs share one 2-bit two's-complement code:
//   00 zero / steady, 01 plus / increasing, 11 minus / decreasing, 10 unused.
// The document asks for data types optimised in width and coding but does not
// give them; this encoding is this design's own choice. With it a whole
// EXECUTE instruction (three qvals) fits in one 32-bit word.
package qsim_pkg;

  localparam int unsigned POS_W  = 7;   // width of the signed position
  localparam int unsigned QMAG_W = POS_W + 1;
  localparam int unsigned QVAL_W = QMAG_W + 2;
  localparam int unsigned WORD_W = 32;  // host channel word width

  typedef logic [1:0] sgn_t;            // 2-bit sign / direction code
  localparam sgn_t SGN_ZERO = 2'b00;
  localparam sgn_t SGN_POS  = 2'b01;
  localparam sgn_t SGN_NEG  = 2'b11;

  typedef struct packed {
    logic                    inf;
    logic signed [POS_W-1:0] pos;
  } qmag_t;

  typedef struct packed {
    qmag_t mag;
    sgn_t  dir;
  } qval_t;

  // One tuple of corresponding values (landmarks of x, y and z).
  typedef struct packed {
    qmag_t c1;
    qmag_t c2;
    qmag_t c3;
  } cval_tuple_t;

  // Set of signs as a 3-bit mask: [2] minus, [1] zero, [0] plus.
  typedef logic [2:0] sgnset_t;

  // Host instruction opcodes, bits 31:30 of an instruction word.
  typedef enum logic [1:0] {
    OP_NOP    = 2'b00,   // ignored
    OP_CLEAR  = 2'b01,   // empty the corresponding-value list
    OP_APPEND = 2'b10,   // append one tuple, payload in bits 23:0
    OP_EXEC   = 2'b11    // execute the MULT-CCF, payload {q1,q2,q3} in 29:0
  } opcode_t;

  // Terminating subfunction reported with every result.
  typedef enum logic [1:0] {
    TERM_NONE = 2'b00,   // all subfunctions passed
    TERM_SF1  = 2'b01,
    TERM_SF2  = 2'b10,
    TERM_SF3  = 2'b11
  } term_t;

  function automatic sgn_t sign_of(logic signed [POS_W-1:0] p);
    if (p == '0)   return SGN_ZERO;
    else if (p[POS_W-1]) return SGN_NEG;
    else           return SGN_POS;
  endfunction

  // Product of two signs: a table on the 2-bit codes.
  function automatic sgn_t sgn_mul(sgn_t a, sgn_t b);
    if (a == SGN_ZERO || b == SGN_ZERO) return SGN_ZERO;
    else if (a == b)                    return SGN_POS;
    else                                return SGN_NEG;
  endfunction

  function automatic sgnset_t sgn_bit(sgn_t a);
    case (a)
      SGN_NEG:  return 3'b100;
      SGN_ZERO: return 3'b010;
      default:  return 3'b001;
    endcase
  endfunction

  // Qualitative sum of two signs: the set of possible signs of a + b.
  function automatic sgnset_t sgn_add(sgn_t a, sgn_t b);
    if (a == SGN_ZERO)      return sgn_bit(b);
    else if (b == SGN_ZERO) return sgn_bit(a);
    else if (a == b)        return sgn_bit(a);
    else                    return 3'b111;
  endfunction

  // Order of |p| against |q| as a sign code (plus: |p| > |q|).
  function automatic sgn_t mag_cmp(logic signed [POS_W-1:0] p,
                                   logic signed [POS_W-1:0] q);
    logic [POS_W-1:0] ap, aq;
    ap = p[POS_W-1] ? POS_W'(-p) : POS_W'(p);
    aq = q[POS_W-1] ? POS_W'(-q) : POS_W'(q);
    if (ap == aq)     return SGN_ZERO;
    else if (ap > aq) return SGN_POS;
    else              return SGN_NEG;
  endfunction

endpackage
