// pp1_ced_round_tb: end-to-end test of the top at its default size
// (n = 64, one NL path, eight CED S-boxes).
//
// A stream of random blocks and round keys is driven, with random idle cycles,
// and every registered result is compared one clock later with an independent
// model of the NL layer.  During the stream, faults are injected now and then
// into the S-box memory row that a chosen S-box is about to read: a flipped
// data bit (caught by the output parity check), a flipped stored output parity
// bit (output check) or a flipped stored input parity bit (input check); the
// flag must appear on exactly that S-box's bit of err_sbox and on err, and
// only for that block.  The test counts each mechanism: back-to-back blocks,
// idle cycles, reset, input-check detections and output-check detections,
// and fails if any of them never occurred.
module pp1_ced_round_tb;
  import gf_ref_pkg::*;
  import pp1_pkg::sbox_word_t;

  localparam int         N    = 64;          // the top's default block width
  localparam int         T    = N / 64;
  localparam int         NS   = N / 8;
  localparam logic [8:0] POLY = 9'h11D;      // the top's default field

  int checks = 0, failures = 0;
  int n_b2b = 0, n_idle = 0, n_reset = 0, n_det_in = 0, n_det_out = 0, n_blocks = 0;

  logic          clk = 1'b0;
  logic          rst_n;
  logic          in_valid;
  logic [N-1:0]  x, k1, k2, v;
  logic [NS-1:0] err_sbox;
  logic          out_valid, err;

  pp1_ced_round dut (
    .clk, .rst_n, .in_valid, .x, .k1, .k2,
    .out_valid, .v, .err_sbox, .err
  );

  always #5 clk = ~clk;

  // Fault injection: one request slot per S-box, index s = 8*j + l.
  logic [7:0] inj_row  [NS];
  logic [9:0] inj_mask [NS];
  event       inj_ev;

  for (genvar j = 0; j < T; j++) begin : g_nl
    for (genvar l = 0; l < 8; l++) begin : g_inj
      localparam int S = 8 * j + l;
      sbox_word_t saved;
      logic [7:0] saved_row;
      bit         active = 1'b0;
      always @(inj_ev) begin
        if (active) dut.g_nl[j].u_nl.g_lane[l].u_sbox.u_mem.mem[saved_row] = saved;
        active = 1'b0;
        if (inj_mask[S] != '0) begin
          saved_row = inj_row[S];
          saved     = dut.g_nl[j].u_nl.g_lane[l].u_sbox.u_mem.mem[saved_row];
          dut.g_nl[j].u_nl.g_lane[l].u_sbox.u_mem.mem[saved_row] = saved ^ inj_mask[S];
          active    = 1'b1;
        end
      end
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t %s: v=%h err_sbox=%b err=%b out_valid=%b", $time, what, v, err_sbox, err, out_valid);
    end
  endtask

  function automatic logic [N-1:0] ref_round(logic [N-1:0] xi, logic [N-1:0] a, logic [N-1:0] b);
    logic [N-1:0] r;
    for (int j = 0; j < T; j++)
      r[N-1-64*j -: 64] = ref_nl(xi[N-1-64*j -: 64], a[N-1-64*j -: 64], b[N-1-64*j -: 64], POLY);
    return r;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected response of the block sampled at the previous edge.
  logic [N-1:0]  exp_v;
  logic [NS-1:0] exp_err;
  logic          exp_valid;

  initial begin
    bit prev_valid;
    int flt_s;
    foreach (inj_mask[s]) begin
      inj_mask[s] = '0;
      inj_row[s]  = '0;
    end
    rst_n    = 1'b0;
    in_valid = 1'b1;            // ignored while reset is active
    x = '0; k1 = '0; k2 = '0;
    repeat (2) @(posedge clk);
    #1;
    check(!out_valid && !err && v == '0, "outputs cleared by reset");
    n_reset++;
    rst_n = 1'b1;
    prev_valid = 1'b0;
    exp_valid  = 1'b0;
    exp_v      = '0;

    for (int cyc = 0; cyc < 3000; cyc++) begin
      // Drive the next input (or an idle cycle).
      in_valid = ($urandom_range(0, 3) != 0);
      for (int w = 0; w < N / 32; w++) begin
        x[32*w +: 32]  = $urandom;
        k1[32*w +: 32] = $urandom;
        k2[32*w +: 32] = $urandom;
      end
      foreach (inj_mask[s]) inj_mask[s] = '0;
      exp_err = '0;
      flt_s   = -1;
      if (in_valid && $urandom_range(0, 4) == 0) begin
        int s, j, l, b;
        s = $urandom_range(0, NS - 1);
        j = s / 8;
        l = s % 8;
        b = $urandom_range(0, 9);          // 0..7 data, 8 par_out, 9 par_in
        inj_row[s]  = ref_op(pre_op(l), x[N-1-64*j-8*l -: 8], k1[N-1-64*j-8*l -: 8]);
        inj_mask[s] = 10'(1 << b);
        exp_err[NS-1-s] = 1'b1;
        flt_s = s;
      end
      -> inj_ev;
      if (in_valid && prev_valid) n_b2b++;
      if (!in_valid) n_idle++;
      prev_valid = in_valid;
      @(posedge clk);
      if (in_valid) begin
        exp_v = ref_round(x, k1, k2);
        if (flt_s >= 0) begin
          // A flipped data bit changes that S-box's output byte.
          int j, l;
          logic [7:0] so;
          j  = flt_s / 8;
          l  = flt_s % 8;
          so = ref_sbox(inj_row[flt_s], POLY) ^ inj_mask[flt_s][7:0];
          exp_v[N-1-64*j-8*l -: 8] = ref_op(post_op(l), so, k2[N-1-64*j-8*l -: 8]);
        end
      end
      exp_valid = in_valid;
      #1;
      // Check the registered response to the block just sampled.
      check(out_valid == exp_valid, "out_valid one cycle after in_valid");
      if (exp_valid) begin
        n_blocks++;
        check(v == exp_v, "round output");
        check(err_sbox == exp_err && err == (exp_err != '0), "error flags");
        if (exp_err != '0) begin
          if (inj_mask[(NS - 1) - $clog2(exp_err)] == 10'h200) n_det_in++;
          else n_det_out++;
        end
      end else begin
        check(!err && v == exp_v, "idle cycle holds v and clears err");
      end
    end
    foreach (inj_mask[s]) inj_mask[s] = '0;
    -> inj_ev;

    // Reset in the middle of operation.
    rst_n = 1'b0;
    @(posedge clk);
    #1;
    check(!out_valid && !err && v == '0, "reset clears a running design");
    n_reset++;

    $display("blocks=%0d back_to_back=%0d idle=%0d resets=%0d input_check_hits=%0d output_check_hits=%0d",
             n_blocks, n_b2b, n_idle, n_reset, n_det_in, n_det_out);
    checks++; if (n_b2b == 0)     begin failures++; $display("FAIL no back-to-back blocks"); end
    checks++; if (n_idle == 0)    begin failures++; $display("FAIL no idle cycles"); end
    checks++; if (n_reset < 2)    begin failures++; $display("FAIL reset not exercised"); end
    checks++; if (n_det_in == 0)  begin failures++; $display("FAIL input check never fired"); end
    checks++; if (n_det_out == 0) begin failures++; $display("FAIL output check never fired"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
