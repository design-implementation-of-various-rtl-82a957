// tb_wallace_tree: checks the carry-save reduction for several row counts.
//
// Trees of 1, 2, 3, 5, 9 and 17 rows (0 to 6 compressor layers) are fed
// random 24-bit rows; sum_row + carry_row must equal the plain sum of the rows
// modulo 2**24, computed by the testbench.
module tb_wallace_tree;
  localparam int W = 24;

  logic [W-1:0] r1 [1], r2 [2], r3 [3], r5 [5], r9 [9], r17 [17];
  logic [W-1:0] s1, c1, s2, c2, s3, c3, s5, c5, s9, c9, s17, c17;
  int checks = 0, failures = 0;

  wallace_tree #(.N(1),  .W(W)) t1  (.rows(r1),  .sum_row(s1),  .carry_row(c1));
  wallace_tree #(.N(2),  .W(W)) t2  (.rows(r2),  .sum_row(s2),  .carry_row(c2));
  wallace_tree #(.N(3),  .W(W)) t3  (.rows(r3),  .sum_row(s3),  .carry_row(c3));
  wallace_tree #(.N(5),  .W(W)) t5  (.rows(r5),  .sum_row(s5),  .carry_row(c5));
  wallace_tree #(.N(9),  .W(W)) t9  (.rows(r9),  .sum_row(s9),  .carry_row(c9));
  wallace_tree #(.N(17), .W(W)) t17 (.rows(r17), .sum_row(s17), .carry_row(c17));

  task automatic check(string name, logic [W-1:0] s, logic [W-1:0] c, logic [W-1:0] exp_sum);
    checks++;
    if (W'(s + c) !== exp_sum) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h", name, W'(s + c), exp_sum);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      logic [W-1:0] e1, e2, e3, e5, e9, e17;
      e1 = '0; e2 = '0; e3 = '0; e5 = '0; e9 = '0; e17 = '0;
      for (int i = 0; i < 17; i++) begin
        logic [W-1:0] v;
        v = (t < 4) ? {W{t[0]}} : W'($urandom);
        r17[i] = v; e17 += v;
        if (i < 9) begin r9[i] = v; e9 += v; end
        if (i < 5) begin r5[i] = v; e5 += v; end
        if (i < 3) begin r3[i] = v; e3 += v; end
        if (i < 2) begin r2[i] = v; e2 += v; end
        if (i < 1) begin r1[i] = v; e1 += v; end
      end
      #1;
      check("N1", s1, c1, e1);
      check("N2", s2, c2, e2);
      check("N3", s3, c3, e3);
      check("N5", s5, c5, e5);
      check("N9", s9, c9, e9);
      check("N17", s17, c17, e17);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
