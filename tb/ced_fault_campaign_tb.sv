// ced_fault_campaign_tb: fault-coverage campaign on the two-parity-bit CED
// S-box.
//
// Faults follow an error-vector model: a vector E with k ones (k = 1..5)
// marks the faulty bits, and each faulty bit is flipped (b ^ e), stuck at 1
// (b | e) or stuck at 0 (b & ~e).  Faults are placed on the S-box input
// (address), on its output byte, or in the 10-bit memory row.  A transient
// fault affects one look-up; a permanent fault stays while all 256 inputs are
// applied and counts as detected if any look-up raises err.  All three
// locations are emulated by rewriting the memory array of the device under
// test: an address fault makes row x hold row xe, an output fault corrupts
// the data column but not the stored parities, a memory fault corrupts the row.
//
// The campaign prints, per fault class, the share of injected faults that
// were detected and the share of effective faults (those that changed what
// was read) that were detected.  It checks the properties that follow from
// parity coding: every single-bit fault that takes effect is detected (which
// makes single bit flips 100 % detected), a detection never happens without
// an effective fault, even-weight address flips are never detected, and
// single transient stuck-at faults are detected about half of the time,
// because a stuck bit already holding its stuck value causes no error.
module ced_fault_campaign_tb;
  import gf_ref_pkg::*;
  import pp1_pkg::sbox_word_t;

  localparam logic [8:0] POLY      = 9'h11D;
  localparam int         N_TRANS   = 600;   // transient faults per class
  localparam int         N_PERM    = 60;    // permanent faults per class

  typedef enum int {LOC_IN = 0, LOC_OUT = 1, LOC_MEM = 2} loc_e;
  typedef enum int {M_FLIP = 0, M_SA1 = 1, M_SA0 = 2} model_e;

  int checks = 0, failures = 0;
  logic [7:0] x, y;
  logic       err_in, err_out, err;
  sbox_word_t golden [256];

  ced_sbox #(.POLY(POLY)) dut (.x(x), .y(y), .err_in(err_in), .err_out(err_out), .err(err));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic [9:0] fault(model_e m, logic [9:0] b, logic [9:0] e);
    case (m)
      M_SA1:   return b | e;
      M_SA0:   return b & ~e;
      default: return b ^ e;
    endcase
  endfunction

  // Random vector of the given width with exactly k ones.
  function automatic logic [9:0] rand_vec(int width, int k);
    logic [9:0] e;
    e = '0;
    while ($countones(e) < k) e[$urandom_range(0, width - 1)] = 1'b1;
    return e;
  endfunction

  // Faulty contents of row r, and whether they differ from the fault-free row.
  function automatic sbox_word_t faulty_row(loc_e loc, model_e m, logic [9:0] e, int r);
    sbox_word_t w;
    case (loc)
      LOC_IN:  w = golden[8'(fault(m, 10'(r), e))];
      LOC_OUT: begin
        w = golden[r];
        w.data = 8'(fault(m, 10'(golden[r].data), e));
      end
      default: w = sbox_word_t'(fault(m, golden[r], e));
    endcase
    return w;
  endfunction

  task automatic restore();
    for (int r = 0; r < 256; r++) dut.u_mem.mem[r] = golden[r];
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int inj, eff, det, det_eff, false_det;
    int sum_inj [2][3], sum_det [2][3];     // [transient/permanent][model], k = 1, all locations
    string lname [3] = '{"input ", "output", "memory"};
    string mname [3] = '{"bit flip", "s-a-1   ", "s-a-0   "};
    #1;
    for (int r = 0; r < 256; r++) golden[r] = dut.u_mem.mem[r];
    foreach (sum_inj[p, m]) begin
      sum_inj[p][m] = 0;
      sum_det[p][m] = 0;
    end

    $display("duration  location model     k  injected effective detected  det/inj%%  det/eff%%");
    for (int perm = 0; perm < 2; perm++)
      for (int li = 0; li < 3; li++)
        for (int mi = 0; mi < 3; mi++)
          for (int k = 1; k <= 5; k++) begin
            loc_e   loc;
            model_e m;
            loc = loc_e'(li);
            m   = model_e'(mi);
            inj = 0; eff = 0; det = 0; det_eff = 0; false_det = 0;
            for (int n = 0; n < (perm ? N_PERM : N_TRANS); n++) begin
              logic [9:0] e;
              bit         is_eff, is_det;
              e = rand_vec(loc == LOC_MEM ? 10 : 8, k);
              is_eff = 1'b0;
              is_det = 1'b0;
              if (!perm) begin
                int xr;
                xr = $urandom_range(0, 255);
                dut.u_mem.mem[xr] = faulty_row(loc, m, e, xr);
                is_eff = (faulty_row(loc, m, e, xr) != golden[xr]);
                x = 8'(xr);
                #1;
                is_det = err;
                dut.u_mem.mem[xr] = golden[xr];
              end else begin
                int r0;
                r0 = $urandom_range(0, 255);
                if (loc == LOC_MEM) begin
                  dut.u_mem.mem[r0] = faulty_row(loc, m, e, r0);
                  is_eff = (faulty_row(loc, m, e, r0) != golden[r0]);
                end else begin
                  for (int r = 0; r < 256; r++) begin
                    dut.u_mem.mem[r] = faulty_row(loc, m, e, r);
                    if (faulty_row(loc, m, e, r) != golden[r]) is_eff = 1'b1;
                  end
                end
                for (int xr = 0; xr < 256; xr++) begin
                  x = 8'(xr);
                  #1;
                  if (err) is_det = 1'b1;
                end
                restore();
              end
              inj++;
              if (is_eff) eff++;
              if (is_det) det++;
              if (is_det && is_eff) det_eff++;
              if (is_det && !is_eff) false_det++;
            end
            $display("%s %s %s %0d %8d %9d %8d %8.1f %9.1f", perm ? "permanent" : "transient",
                     lname[li], mname[mi], k, inj, eff, det,
                     100.0 * det / inj, eff ? 100.0 * det_eff / eff : 0.0);
            check(false_det == 0, "no detection without an effective fault");
            if (k == 1) begin
              check(det_eff == eff, "every effective single-bit fault is detected");
              if (m == M_FLIP) check(det == inj, "single bit flips are always detected");
              sum_inj[perm][mi] += inj;
              sum_det[perm][mi] += det;
            end
            if (k % 2 == 0 && loc == LOC_IN && m == M_FLIP)
              check(det == 0, "even-weight address flips escape the parity checks");
          end

    // Single faults summed over the three locations (the bit-flip / s-a
    // comparison for two parity bits).
    for (int perm = 0; perm < 2; perm++)
      for (int mi = 0; mi < 3; mi++)
        $display("single %s %s: %0.1f %% detected", perm ? "permanent" : "transient", mname[mi],
                 100.0 * sum_det[perm][mi] / sum_inj[perm][mi]);
    for (int mi = 1; mi < 3; mi++) begin
      real pct;
      pct = 100.0 * sum_det[0][mi] / sum_inj[0][mi];
      check(pct > 38.0 && pct < 62.0, "single transient stuck-at faults detected about half the time");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
