// tb_cla_adder: checks the carry look-ahead adder.
//
// An 8-bit adder is checked exhaustively (both carry-in values) and a 35-bit
// adder, whose width is not a multiple of four, with random operands and with
// the all-ones carry chain. Expected results are a + b + cin computed by the
// testbench.
module tb_cla_adder;
  logic [7:0]  a8, b8, s8;
  logic        ci8, co8;
  logic [34:0] a35, b35, s35;
  logic        ci35, co35;
  int checks = 0, failures = 0;

  cla_adder #(.W(8))  u8  (.a(a8),  .b(b8),  .cin(ci8),  .sum(s8),  .cout(co8));
  cla_adder #(.W(35)) u35 (.a(a35), .b(b35), .cin(ci35), .sum(s35), .cout(co35));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++)
        for (int c = 0; c < 2; c++) begin
          logic [8:0] e;
          a8 = 8'(a); b8 = 8'(b); ci8 = c[0];
          #1;
          e = 9'(a + b + c);
          checks++;
          if ({co8, s8} !== e) begin
            failures++;
            if (failures < 10) $display("FAIL8 %0d+%0d+%0d got %0d", a, b, c, {co8, s8});
          end
        end
    for (int t = 0; t < 5000; t++) begin
      logic [35:0] e;
      if (t == 0) begin a35 = '1; b35 = '0; ci35 = 1'b1; end
      else if (t == 1) begin a35 = '1; b35 = '1; ci35 = 1'b1; end
      else begin
        a35 = {$urandom, $urandom};
        b35 = {$urandom, $urandom};
        ci35 = $urandom;
      end
      #1;
      e = {1'b0, a35} + {1'b0, b35} + 36'(ci35);
      checks++;
      if ({co35, s35} !== e) begin
        failures++;
        if (failures < 10) $display("FAIL35 %h+%h+%b got %h", a35, b35, ci35, {co35, s35});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
