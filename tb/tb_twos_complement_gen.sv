// tb_twos_complement_gen: exhaustive check of the negator.
//
// Drives every value of an 8-bit word and compares md_neg with (0 - md)
// computed by the testbench, modulo 2**8. A watchdog ends the run if it stalls.
module tb_twos_complement_gen;
  localparam int W = 8;

  logic [W-1:0] md, md_neg;
  int checks = 0, failures = 0;

  twos_complement_gen #(.W(W)) dut (.md(md), .md_neg(md_neg));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << W); v++) begin
      logic [W-1:0] exp_neg;
      md = W'(v);
      #1;
      exp_neg = W'((1 << W) - v);
      checks++;
      if (md_neg !== exp_neg) begin
        failures++;
        if (failures < 10) $display("FAIL md=%0d got %0d exp %0d", v, md_neg, exp_neg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
