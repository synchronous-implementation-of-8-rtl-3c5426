// tb_subtractor: exhaustive self-check of the 8-bit subtractor.
// Every pair of 8-bit operands is applied and the difference compared with
// (a + 256 - b) mod 256, computed in 32-bit integer arithmetic.
module tb_subtractor;
  import sqrt_pkg::*;

  logic [DATA_W-1:0] a, b, diff;
  int checks = 0, failures = 0;

  subtractor dut (.a_i(a), .b_i(b), .diff_o(diff));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        int expect_v;
        a = DATA_W'(i);
        b = DATA_W'(j);
        #1;
        expect_v = (i + 256 - j) % 256;
        checks++;
        if (int'(diff) != expect_v) begin
          failures++;
          if (failures < 10) $display("FAIL %0d - %0d: got %0d expected %0d", i, j, diff, expect_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
