// parity_gen: parity generator of the CED S-box.
//
// Produces the even parity bit (XOR of all bits) of a W-bit bus.  The CED
// S-box uses two of them: one on the incoming byte (input parity) and one on
// the outgoing byte (output parity); each result is compared with a parity bit
// stored in the S-box memory.  Even parity is this design's choice; the stored
// columns use the same convention, so odd parity would detect the same errors.
//
// Interface: d (W bits) in, p out.  Purely combinational.
module parity_gen #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] d,
  output logic         p
);
  always_comb p = ^d;
endmodule
