// nl_element: 64-bit nonlinear element NL of one PP-1 processing path, built
// with CED S-boxes.
//
// The 64-bit input is split into eight byte lanes.  Lane l is first combined
// with byte l of the round key k' using the operation PRE_OPS[l] (XOR,
// addition or subtraction modulo 256), then substituted by a ced_sbox, then
// combined with byte l of k'' using POST_OPS[l].  The lane layout of the
// operations is that of the PP-1 NL element; lane 0 is the most significant
// byte and subtraction is data minus key (choices of this design, as the
// order of the operands is not fixed by the structure alone).
//
// Every S-box reports its own error flag: err_lane[NL_LANES-1-l] belongs to
// lane l, so that err_lane lines up with the bytes of x (MSB = lane 0); err
// is their OR.
//
// Interface: x, k1 (k'), k2 (k'') 64 bits in; v 64 bits, err_lane 8 bits and
// err out.  Purely combinational.
module nl_element
  import pp1_pkg::*;
#(
  parameter logic [8:0] POLY = DEFAULT_POLY
) (
  input  logic [NL_W-1:0]     x,
  input  logic [NL_W-1:0]     k1,
  input  logic [NL_W-1:0]     k2,
  output logic [NL_W-1:0]     v,
  output logic [NL_LANES-1:0] err_lane,
  output logic                err
);
  for (genvar l = 0; l < NL_LANES; l++) begin : g_lane
    localparam int unsigned HI = NL_W - 1 - BYTE_W * l;
    byte_t s_in, s_out;
    logic  e_any;

    always_comb s_in = lane_apply(PRE_OPS[l], x[HI -: BYTE_W], k1[HI -: BYTE_W]);

    ced_sbox #(.POLY(POLY)) u_sbox (
      .x       (s_in),
      .y       (s_out),
      .err_in  (),
      .err_out (),
      .err     (e_any)
    );

    always_comb begin
      v[HI -: BYTE_W]         = lane_apply(POST_OPS[l], s_out, k2[HI -: BYTE_W]);
      err_lane[NL_LANES-1-l]  = e_any;
    end
  end

  always_comb err = |err_lane;
endmodule
