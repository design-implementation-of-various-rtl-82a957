// tb_booth_encoder: exhaustive check of the radix-2 Booth recoding.
//
// For every 6-bit multiplier value the testbench checks each pair of select
// lines against the encoding table written out here (00 and 11 -> digit 0,
// 01 -> +1, 10 -> -1), and checks that the digits, weighted by 2**i, sum to
// the signed value of the multiplier.
module tb_booth_encoder;
  localparam int N = 6;

  logic [N-1:0] mr, x, z;
  int checks = 0, failures = 0;

  booth_encoder #(.N(N)) dut (.mr(mr), .x(x), .z(z));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << N); v++) begin
      int total;
      mr = N'(v);
      #1;
      total = 0;
      for (int i = 0; i < N; i++) begin
        logic cur, prev, exp_x, exp_z;
        cur  = mr[i];
        prev = (i == 0) ? 1'b0 : mr[i-1];
        case ({cur, prev})
          2'b00: begin exp_x = 0; exp_z = 0; end
          2'b01: begin exp_x = 0; exp_z = 1; end
          2'b10: begin exp_x = 1; exp_z = 1; end
          default: begin exp_x = 0; exp_z = 0; end
        endcase
        checks++;
        if (x[i] !== exp_x || z[i] !== exp_z) begin
          failures++;
          if (failures < 10) $display("FAIL mr=%b bit %0d x=%b z=%b", mr, i, x[i], z[i]);
        end
        if (z[i]) total += (x[i] ? -1 : 1) * (1 << i);
      end
      checks++;
      if (total != int'($signed(mr))) begin
        failures++;
        if (failures < 10) $display("FAIL mr=%b digit sum %0d", mr, total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
