// tb_partial_product_gen: checks row selection, sign extension and weighting.
//
// A 5-bit multiplicand and 4 rows of 10 bits are used. For every multiplicand
// and every select pattern the testbench computes each expected row as
// (digit * signed md) << i modulo 2**10, with -md supplied by the testbench.
module tb_partial_product_gen;
  localparam int MD_W = 5, N = 4, P_W = 10;

  logic [MD_W-1:0] md, md_neg;
  logic [N-1:0]    x, z;
  logic [P_W-1:0]  pp [N];
  int checks = 0, failures = 0;

  partial_product_gen #(.MD_W(MD_W), .N(N), .P_W(P_W)) dut (
    .md(md), .md_neg(md_neg), .x(x), .z(z), .pp(pp));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << MD_W); v++) begin
      for (int s = 0; s < (1 << (2 * N)); s++) begin
        md     = MD_W'(v);
        md_neg = MD_W'(-v);
        x      = N'(s);
        z      = N'(s >> N);
        #1;
        for (int i = 0; i < N; i++) begin
          int digit, mdv;
          logic [P_W-1:0] exp_row;
          mdv   = int'($signed(md));
          digit = z[i] ? (x[i] ? -1 : 1) : 0;
          // -(-16) wraps to -16 in 5 bits; the generator sees the wrapped value
          if (digit == -1) mdv = int'($signed(md_neg));
          else if (digit == 0) mdv = 0;
          exp_row = P_W'(mdv * (1 << i));
          checks++;
          if (pp[i] !== exp_row) begin
            failures++;
            if (failures < 10)
              $display("FAIL md=%0d x=%b z=%b row %0d got %h exp %h", v, x, z, i, pp[i], exp_row);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
