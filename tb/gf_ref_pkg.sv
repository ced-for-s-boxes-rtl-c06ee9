// gf_ref_pkg: independent reference model of the PP-1 style S-box for the
// testbenches.  It multiplies in GF(2^8) by a full carry-less product followed
// by polynomial reduction, and finds inverses by exhaustive search, so it
// shares no code with the design's elaboration-time table generator.
package gf_ref_pkg;

  function automatic logic [7:0] ref_mul(logic [7:0] a, logic [7:0] b, logic [8:0] poly);
    logic [14:0] prod;
    prod = '0;
    for (int i = 0; i < 8; i++)
      if (a[i]) prod ^= 15'(b) << i;
    for (int bitn = 14; bitn >= 8; bitn--)
      if (prod[bitn]) prod ^= 15'(poly) << (bitn - 8);
    return prod[7:0];
  endfunction

  function automatic logic [7:0] ref_sbox(logic [7:0] x, logic [8:0] poly);
    if (x == 8'h00) return 8'h00;
    for (int y = 1; y < 256; y++)
      if (ref_mul(x, 8'(y), poly) == 8'h01) return 8'(y);
    return 8'h00;
  endfunction

  function automatic logic ref_parity(logic [7:0] d);
    logic p;
    p = 1'b0;
    for (int i = 0; i < 8; i++) p = p ^ d[i];
    return p;
  endfunction

  // Keying operations of the NL element, lane 0 (most significant byte) first:
  // 0 = XOR, 1 = add mod 256, 2 = subtract (data - key) mod 256.
  function automatic int pre_op(int lane);
    int ops [8] = '{0, 1, 0, 2, 2, 0, 1, 0};
    return ops[lane];
  endfunction

  function automatic int post_op(int lane);
    int ops [8] = '{0, 2, 0, 1, 1, 0, 2, 0};
    return ops[lane];
  endfunction

  function automatic logic [7:0] ref_op(int op, logic [7:0] d, logic [7:0] k);
    int r;
    case (op)
      1:       r = (int'(d) + int'(k)) % 256;
      2:       r = (int'(d) - int'(k) + 256) % 256;
      default: r = int'(d) ^ int'(k);
    endcase
    return 8'(r);
  endfunction

  // Reference NL element on one 64-bit path.
  function automatic logic [63:0] ref_nl(logic [63:0] x, logic [63:0] k1,
                                         logic [63:0] k2, logic [8:0] poly);
    logic [63:0] v;
    for (int l = 0; l < 8; l++) begin
      logic [7:0] a;
      a = ref_op(pre_op(l), x[63-8*l -: 8], k1[63-8*l -: 8]);
      a = ref_sbox(a, poly);
      v[63-8*l -: 8] = ref_op(post_op(l), a, k2[63-8*l -: 8]);
    end
    return v;
  endfunction

endpackage
