// sbox_mem_tb: reads every row of the 256 x 10 S-box memory and checks the
// data column against an independently computed GF(2^8) inverse, the two
// parity columns against the parity of the address and of the data, and the
// involution and bijection properties of the table.  A second instance with
// another primitive polynomial, 0x12B, is checked exhaustively as well.
module sbox_mem_tb;
  import gf_ref_pkg::*;

  localparam logic [8:0] POLY = 9'h11D;

  int checks = 0, failures = 0;
  logic [7:0] addr, data, addr2, data2;
  logic       par_in, par_out, pi2, po2;
  bit         seen [256];

  sbox_mem #(.POLY(POLY))   dut  (.addr(addr),  .data(data),  .par_in(par_in), .par_out(par_out));
  sbox_mem #(.POLY(9'h12B)) dut2 (.addr(addr2), .data(data2), .par_in(pi2),    .par_out(po2));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (addr=%h data=%h addr2=%h data2=%h)", what, addr, data, addr2, data2);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] y;
    for (int i = 0; i < 256; i++) begin
      addr = 8'(i);
      #1;
      y = ref_sbox(addr, POLY);
      check(data == y, "data column");
      check(par_in == ref_parity(addr), "input parity column");
      check(par_out == ref_parity(y), "output parity column");
      check(!seen[data], "table is a bijection");
      seen[data] = 1'b1;
      addr = data;
      #1;
      check(data == 8'(i), "S(S(x)) == x");
    end
    for (int i = 0; i < 256; i++) begin
      addr2 = 8'(i);
      #1;
      check(data2 == ref_sbox(addr2, 9'h12B) && pi2 == ref_parity(addr2) && po2 == ref_parity(data2),
            "row under POLY = 0x12B");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
