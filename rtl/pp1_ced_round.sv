// pp1_ced_round: nonlinear layer of one PP-1 round with concurrent error
// detection in every S-box (top of the design).
//
// A PP-1 round on an n-bit block runs t = n/64 NL elements in parallel, NL j
// taking 64-bit slice j of the block and of the two n-bit round keys
// k' = k_(2i-1) and k'' = k_(2i), and then applies an n-bit involutive bit
// permutation P.  This module builds the t NL elements, each with eight
// two-parity-bit CED S-boxes, and registers their n-bit result v together
// with the error flags of all n/8 S-boxes.  P, the key schedule and the round
// iteration are not part of this module: v is the value that feeds P.
//
// NL 0 takes the most significant 64 bits (the leftmost path), and the error
// vector err_sbox has one bit per byte of v, most significant byte first.
// The block width n defaults to 64 (one path); the output register stage, its
// valid bit and the synchronous active-low reset are choices of this design.
//
// Timing: inputs are sampled when in_valid is high; v, err_sbox and err are
// valid one clock later, qualified by out_valid.  A new block can enter every
// cycle.  err is high in a cycle whose result came from at least one S-box
// whose parity checks disagreed.
module pp1_ced_round
  import pp1_pkg::*;
#(
  parameter int unsigned N    = 64,
  parameter logic [8:0]  POLY = DEFAULT_POLY
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [N-1:0]     x,
  input  logic [N-1:0]     k1,
  input  logic [N-1:0]     k2,
  output logic             out_valid,
  output logic [N-1:0]     v,
  output logic [N/8-1:0]   err_sbox,
  output logic             err
);
  localparam int unsigned T = N / NL_W;

  initial begin
    assert (N % NL_W == 0 && N > 0)
      else $error("N must be a positive multiple of %0d", NL_W);
  end

  logic [N-1:0]   v_c;
  logic [N/8-1:0] err_c;

  for (genvar j = 0; j < T; j++) begin : g_nl
    localparam int unsigned HI = N - 1 - NL_W * j;
    logic unused_err;

    nl_element #(.POLY(POLY)) u_nl (
      .x        (x[HI -: NL_W]),
      .k1       (k1[HI -: NL_W]),
      .k2       (k2[HI -: NL_W]),
      .v        (v_c[HI -: NL_W]),
      .err_lane (err_c[N/8-1-NL_LANES*j -: NL_LANES]),
      .err      (unused_err)
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      v         <= '0;
      err_sbox  <= '0;
      err       <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        v        <= v_c;
        err_sbox <= err_c;
        err      <= |err_c;
      end else begin
        err      <= 1'b0;
      end
    end
  end
endmodule
