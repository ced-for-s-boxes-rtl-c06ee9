// ced_sbox: S-box with concurrent error detection by two parity bits.
//
// The S-box memory is widened from 256 x 8 to 256 x 10 bits (sbox_mem).  The
// extra columns hold, per row, the parity of the row's address and the parity
// of its output byte.  Two checks run concurrently with every look-up:
//   * input check:  parity of the incoming byte x versus the stored input
//     parity of the row that was actually read; catches odd-weight errors on
//     the address path and in the stored input-parity column;
//   * output check: parity of the outgoing byte y versus the stored output
//     parity; catches odd-weight errors in the data columns and on the output.
// err_in and err_out report the two mismatches separately and err is their OR;
// the OR and the separate flags are this design's choice of how to present
// the two comparator outputs.
//
// Interface: x in, y = S(x) out, err_in/err_out/err out.  Purely
// combinational: the flags are valid together with y.
module ced_sbox
  import pp1_pkg::*;
#(
  parameter logic [8:0] POLY = DEFAULT_POLY
) (
  input  byte_t x,
  output byte_t y,
  output logic  err_in,
  output logic  err_out,
  output logic  err
);
  logic p_in_pred, p_out_gen;
  logic p_in_stored, p_out_stored;

  parity_gen #(.W(BYTE_W)) u_in_par (.d(x), .p(p_in_pred));

  sbox_mem #(.POLY(POLY)) u_mem (
    .addr    (x),
    .data    (y),
    .par_in  (p_in_stored),
    .par_out (p_out_stored)
  );

  parity_gen #(.W(BYTE_W)) u_out_par (.d(y), .p(p_out_gen));

  always_comb begin
    err_in  = p_in_pred ^ p_in_stored;
    err_out = p_out_gen ^ p_out_stored;
    err     = err_in | err_out;
  end
endmodule
