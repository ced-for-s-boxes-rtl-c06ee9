// parity_gen_tb: exhaustive check of the parity generator at W = 8 (all 256
// inputs) and random check at W = 10, against a bit-counting reference.
module parity_gen_tb;
  int checks = 0, failures = 0;
  logic [7:0] d8;
  logic       p8;
  logic [9:0] d10;
  logic       p10;

  parity_gen #(.W(8))  dut8  (.d(d8),  .p(p8));
  parity_gen #(.W(10)) dut10 (.d(d10), .p(p10));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      d8 = 8'(i);
      #1;
      checks++;
      if (p8 !== ($countones(d8) % 2 == 1)) begin
        failures++;
        $display("FAIL W=8 d=%h p=%b", d8, p8);
      end
    end
    for (int i = 0; i < 200; i++) begin
      d10 = 10'($urandom);
      #1;
      checks++;
      if (p10 !== ($countones(d10) % 2 == 1)) begin
        failures++;
        $display("FAIL W=10 d=%h p=%b", d10, p10);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
