// ced_sbox_tb: checks the two-parity-bit CED S-box.
//  1. Fault-free: for all 256 inputs y = S(x) (independent reference) and no
//     error flag is raised.
//  2. Faults, emulated by rewriting rows of the S-box memory array:
//     - a single bit flip in the data columns of row x      -> err_out only
//     - a flip of the stored output parity bit              -> err_out only
//     - a flip of the stored input parity bit               -> err_in only
//     - an odd-weight error on the address (row x reads row x ^ e) -> err_in
//     - an even-weight address error (undetectable by parity) -> no err_in
//  Each fault is removed again before the next one.
module ced_sbox_tb;
  import gf_ref_pkg::*;
  import pp1_pkg::sbox_word_t;

  localparam logic [8:0] POLY = 9'h11D;

  int checks = 0, failures = 0;
  logic [7:0] x, y;
  logic       err_in, err_out, err;
  sbox_word_t golden [256];

  ced_sbox #(.POLY(POLY)) dut (.x(x), .y(y), .err_in(err_in), .err_out(err_out), .err(err));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: x=%h y=%h err_in=%b err_out=%b err=%b", what, x, y, err_in, err_out, err);
    end
  endtask

  task automatic apply(logic [7:0] v);
    x = v;
    #1;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    for (int i = 0; i < 256; i++) golden[i] = dut.u_mem.mem[i];

    for (int i = 0; i < 256; i++) begin
      apply(8'(i));
      check(y == ref_sbox(x, POLY), "fault-free output");
      check({err_in, err_out, err} == 3'b000, "no false alarm");
    end

    for (int n = 0; n < 300; n++) begin
      logic [7:0] a, e;
      int b;
      a = 8'($urandom);
      b = $urandom_range(0, 7);
      // data bit flip
      dut.u_mem.mem[a].data[b] = ~golden[a].data[b];
      apply(a);
      check(err_out && !err_in && err, "data bit flip detected by output parity");
      dut.u_mem.mem[a] = golden[a];
      // stored parity flips
      dut.u_mem.mem[a].par_out = ~golden[a].par_out;
      apply(a);
      check(err_out && !err_in && err, "output parity cell flip detected");
      dut.u_mem.mem[a] = golden[a];
      dut.u_mem.mem[a].par_in = ~golden[a].par_in;
      apply(a);
      check(err_in && !err_out && err, "input parity cell flip detected");
      dut.u_mem.mem[a] = golden[a];
      // address errors: row a returns the contents of row a ^ e
      e = 8'(1 << b);
      if (n % 2 == 1) e = e ^ 8'(1 << ((b + 1) % 8)) ^ 8'(1 << ((b + 3) % 8));
      dut.u_mem.mem[a] = golden[a ^ e];
      apply(a);
      check(err_in && !err_out && err && y == ref_sbox(a ^ e, POLY), "odd address error detected");
      e = 8'(1 << b) ^ 8'(1 << ((b + 5) % 8));
      dut.u_mem.mem[a] = golden[a ^ e];
      apply(a);
      check(!err_in && !err_out && !err, "even address error passes parity");
      dut.u_mem.mem[a] = golden[a];
      apply(a);
      check(!err && y == ref_sbox(a, POLY), "row restored");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
