// sbox_mem: 256 x 10 bit memory of the two-parity-bit CED S-box.
//
// Each row x holds three fields (see pp1_pkg::sbox_word_t): the S-box output
// S(x) (8 bits), the parity of the input x and the parity of S(x).  Compared
// with a plain 256 x 8 S-box memory this adds 512 bits (25 % redundancy).
// The S-box is the PP-1 style involution S(x) = x^-1 in GF(2^8), S(0) = 0,
// over the field set by POLY, which must be a primitive polynomial (x^8 term
// included, 9 bits); the table is computed at elaboration from that formula.  PP-1's own S-box uses a particular primitive polynomial that is
// not reproduced here, so POLY is this design's choice (default 0x11D).
//
// Interface: addr (8 bits) selects a row; data, par_in and par_out are the
// row's fields.  The read is asynchronous (combinational), as in a ROM look-up
// table, so a whole NL element stays combinational.
module sbox_mem
  import pp1_pkg::*;
#(
  parameter logic [8:0] POLY = DEFAULT_POLY
) (
  input  byte_t addr,
  output byte_t data,
  output logic  par_in,
  output logic  par_out
);
  sbox_word_t mem [SBOX_N];

  // Table generation.  Because POLY is primitive, g = 0x02 generates the
  // multiplicative group: walking pw[i] = g^i for i = 0..254 lists every
  // non-zero element once, and the inverse of g^i is g^(255-i).
  initial begin
    byte_t pw [SBOX_N-1];
    byte_t e;
    e = 8'h01;
    for (int i = 0; i < SBOX_N - 1; i++) begin
      pw[i] = e;
      e     = gf_xtime(e, POLY);
    end
    mem[0] = sbox_row(8'h00, 8'h00);
    for (int i = 0; i < SBOX_N - 1; i++)
      mem[pw[i]] = sbox_row(pw[i], pw[(SBOX_N - 1 - i) % (SBOX_N - 1)]);
  end

  sbox_word_t rd;
  always_comb begin
    rd      = mem[addr];
    data    = rd.data;
    par_in  = rd.par_in;
    par_out = rd.par_out;
  end
endmodule
