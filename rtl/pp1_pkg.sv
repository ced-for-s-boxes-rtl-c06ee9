// pp1_pkg: types, constants and constant functions shared by the PP-1
// S-box concurrent-error-detection (CED) design.
//
// The S-box of PP-1 is an involution built from the multiplicative inverse in
// GF(2^8) (S(0) = 0, S(x) = x^-1 otherwise).  The field is defined by a
// primitive polynomial which is a parameter of the memory; the helpers here
// let the memory generate its table in SystemVerilog rather than hold it as a
// list of numbers.
//
// The byte-lane keying operations of the nonlinear element NL (XOR, addition
// and subtraction modulo 256) and their placement across the eight lanes follow
// the structure of the PP-1 NL element.  Lane 0 is the leftmost lane of that
// structure and carries the most significant byte of the 64-bit word; the
// subtraction is "data minus key".  Both of these are choices of this design.
package pp1_pkg;

  localparam int unsigned BYTE_W   = 8;
  localparam int unsigned SBOX_N   = 1 << BYTE_W;   // 256 rows
  localparam int unsigned NL_W     = 64;            // width of one NL path
  localparam int unsigned NL_LANES = NL_W / BYTE_W; // 8 byte lanes per NL

  // Default field polynomial x^8 + x^4 + x^3 + x^2 + 1 (primitive).
  localparam logic [8:0] DEFAULT_POLY = 9'h11D;

  typedef logic [BYTE_W-1:0] byte_t;

  // One row of the 256 x 10 CED S-box memory.
  typedef struct packed {
    logic  par_in;   // parity of the row address (the S-box input)
    logic  par_out;  // parity of the stored S-box output
    byte_t data;     // S(x)
  } sbox_word_t;

  // Keying operation applied to one byte lane, modulo 256.
  typedef enum logic [1:0] {
    OP_XOR = 2'd0,
    OP_ADD = 2'd1,
    OP_SUB = 2'd2
  } lane_op_e;

  // Keying before the S-boxes (with k') and after them (with k''), lane 0 first.
  localparam lane_op_e PRE_OPS  [NL_LANES] = '{OP_XOR, OP_ADD, OP_XOR, OP_SUB,
                                                OP_SUB, OP_XOR, OP_ADD, OP_XOR};
  localparam lane_op_e POST_OPS [NL_LANES] = '{OP_XOR, OP_SUB, OP_XOR, OP_ADD,
                                                OP_ADD, OP_XOR, OP_SUB, OP_XOR};

  function automatic byte_t lane_apply(lane_op_e op, byte_t d, byte_t k);
    case (op)
      OP_ADD:  return byte_t'(d + k);
      OP_SUB:  return byte_t'(d - k);
      default: return d ^ k;
    endcase
  endfunction

  // Multiplication by the field element x (0x02) modulo poly.
  function automatic byte_t gf_xtime(byte_t a, logic [8:0] poly);
    logic [8:0] sh;
    sh = {a, 1'b0};
    if (sh[8]) sh = sh ^ poly;
    return sh[7:0];
  endfunction

  // Memory row for input x whose S-box output is sx.
  function automatic sbox_word_t sbox_row(byte_t x, byte_t sx);
    sbox_word_t w;
    w.data    = sx;
    w.par_in  = ^x;
    w.par_out = ^sx;
    return w;
  endfunction

endpackage
