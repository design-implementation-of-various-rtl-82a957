// tb_booth_wallace_mult: checks the Booth-encoded Wallace tree multiplier.
//
// Three sizes are tested in signed and unsigned mode:
//   4 x 4   (the default size) every operand pair,
//   7 x 5   every operand pair,
//   18 x 16 (the size used by the FFT) random pairs plus the corner values
//           0, 1, -1, the most negative and the most positive numbers.
// Expected products are computed by the testbench with 64-bit integer
// arithmetic. Each mode is counted; a mode never exercised is a failure.
module tb_booth_wallace_mult;
  logic        sm;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  logic [6:0]  a7;
  logic [4:0]  b5;
  logic [11:0] p7;
  logic [17:0] a18;
  logic [15:0] b16;
  logic [33:0] p18;
  int checks = 0, failures = 0;
  int n_signed = 0, n_unsigned = 0;

  booth_wallace_mult                         u4  (.signed_mode(sm), .md(a4),  .mr(b4),  .prod(p4));
  booth_wallace_mult #(.MD_W(7),  .MR_W(5))  u7  (.signed_mode(sm), .md(a7),  .mr(b5),  .prod(p7));
  booth_wallace_mult #(.MD_W(18), .MR_W(16)) u18 (.signed_mode(sm), .md(a18), .mr(b16), .prod(p18));

  // reference: value of an operand in the current mode
  function automatic longint opval(logic [63:0] v, int w, logic s);
    longint r = longint'(v & ((64'd1 << w) - 1));
    if (s && v[w-1]) r -= longint'(64'd1 << w);
    return r;
  endfunction

  task automatic cmp(string name, logic [63:0] got, longint exp_val, int w);
    logic [63:0] e = 64'(exp_val) & ((64'd1 << w) - 1);
    checks++;
    if (sm) n_signed++; else n_unsigned++;
    if (got !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %s sm=%b got %h exp %h", name, sm, got, e);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint corner_a [5], corner_b [5];
    a7 = '0; b5 = '0; a18 = '0; b16 = '0; a4 = '0; b4 = '0;
    for (int s = 0; s < 2; s++) begin
      sm = s[0];
      for (int a = 0; a < 16; a++)
        for (int b = 0; b < 16; b++) begin
          a4 = 4'(a); b4 = 4'(b);
          #1;
          cmp("4x4", 64'(p4), opval(64'(a4), 4, sm) * opval(64'(b4), 4, sm), 8);
        end
      for (int a = 0; a < 128; a++)
        for (int b = 0; b < 32; b++) begin
          a7 = 7'(a); b5 = 5'(b);
          #1;
          cmp("7x5", 64'(p7), opval(64'(a7), 7, sm) * opval(64'(b5), 5, sm), 12);
        end
      corner_a = '{0, 1, -1, -(1 <<< 17), (1 <<< 17) - 1};
      corner_b = '{0, 1, -1, -(1 <<< 15), (1 <<< 15) - 1};
      for (int i = 0; i < 5; i++)
        for (int j = 0; j < 5; j++) begin
          a18 = 18'(corner_a[i]); b16 = 16'(corner_b[j]);
          #1;
          cmp("18x16c", 64'(p18), opval(64'(a18), 18, sm) * opval(64'(b16), 16, sm), 34);
        end
      for (int t = 0; t < 20000; t++) begin
        a18 = 18'($urandom); b16 = 16'($urandom);
        #1;
        cmp("18x16", 64'(p18), opval(64'(a18), 18, sm) * opval(64'(b16), 16, sm), 34);
      end
    end
    $display("signed products %0d, unsigned products %0d", n_signed, n_unsigned);
    if (n_signed == 0 || n_unsigned == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
