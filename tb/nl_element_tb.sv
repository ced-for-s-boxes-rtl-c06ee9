// nl_element_tb: checks the 64-bit NL element built from CED S-boxes.
//  1. Fault-free: random blocks and keys, plus all-zero/all-one corner cases,
//     are compared with an independent model of the eight keyed lanes (XOR,
//     add, subtract modulo 256 around the S-box); no error flag may rise.
//  2. Faults: for a random block, the memory row that one lane is about to
//     read is corrupted (a data bit or a stored parity bit); exactly that
//     lane's bit of err_lane and err must rise.  The row is restored after.
module nl_element_tb;
  import gf_ref_pkg::*;
  import pp1_pkg::sbox_word_t;

  localparam logic [8:0] POLY = 9'h11D;

  int checks = 0, failures = 0;
  logic [63:0] x, k1, k2, v;
  logic [7:0]  err_lane;
  logic        err;

  // Fault injection requests, one per lane (lane 0 = most significant byte).
  logic [7:0] inj_row  [8];
  logic [9:0] inj_mask [8];
  event       inj_ev;

  nl_element #(.POLY(POLY)) dut (.x(x), .k1(k1), .k2(k2), .v(v), .err_lane(err_lane), .err(err));

  for (genvar l = 0; l < 8; l++) begin : g_inj
    sbox_word_t saved;
    logic [7:0] saved_row;
    bit         active = 1'b0;
    always @(inj_ev) begin
      if (active) dut.g_lane[l].u_sbox.u_mem.mem[saved_row] = saved;
      active = 1'b0;
      if (inj_mask[l] != '0) begin
        saved_row = inj_row[l];
        saved     = dut.g_lane[l].u_sbox.u_mem.mem[saved_row];
        dut.g_lane[l].u_sbox.u_mem.mem[saved_row] = saved ^ inj_mask[l];
        active    = 1'b1;
      end
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: x=%h k1=%h k2=%h v=%h err_lane=%b", what, x, k1, k2, v, err_lane);
    end
  endtask

  task automatic inject(int lane, logic [7:0] row, logic [9:0] mask);
    foreach (inj_mask[l]) inj_mask[l] = '0;
    if (lane >= 0) begin
      inj_row[lane]  = row;
      inj_mask[lane] = mask;
    end
    -> inj_ev;
    #1;
  endtask

  function automatic logic [63:0] rnd64();
    return {$urandom, $urandom};
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (inj_mask[l]) begin
      inj_mask[l] = '0;
      inj_row[l]  = '0;
    end
    for (int n = 0; n < 404; n++) begin
      case (n)
        0:       begin x = '0; k1 = '0; k2 = '0; end
        1:       begin x = '1; k1 = '1; k2 = '1; end
        2:       begin x = '1; k1 = '0; k2 = '1; end
        3:       begin x = 64'h0123456789ABCDEF; k1 = '1; k2 = '0; end
        default: begin x = rnd64(); k1 = rnd64(); k2 = rnd64(); end
      endcase
      #1;
      check(v == ref_nl(x, k1, k2, POLY), "fault-free NL output");
      check(err_lane == '0 && !err, "no false alarm");
    end

    for (int n = 0; n < 200; n++) begin
      int         lane, b;
      logic [7:0] row;
      logic [9:0] mask;
      x  = rnd64();
      k1 = rnd64();
      k2 = rnd64();
      lane = $urandom_range(0, 7);
      b    = $urandom_range(0, 9);        // bits 0..7 data, 8 par_out, 9 par_in
      mask = 10'(1 << b);
      row  = ref_op(pre_op(lane), x[63-8*lane -: 8], k1[63-8*lane -: 8]);
      inject(lane, row, mask);
      check(err_lane == 8'(1 << (7 - lane)) && err, "single S-box fault flagged in its lane");
      inject(-1, '0, '0);
      check(err_lane == '0 && !err && v == ref_nl(x, k1, k2, POLY), "fault removed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
