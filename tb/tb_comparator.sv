// tb_comparator: exhaustive self-check of the 8-bit comparator.
// Every pair of 8-bit operands is applied and Smaller compared with the
// integer comparison i < j.
module tb_comparator;
  import sqrt_pkg::*;

  logic [DATA_W-1:0] a, b;
  logic smaller;
  int checks = 0, failures = 0;

  comparator dut (.a_i(a), .b_i(b), .smaller_o(smaller));

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
        a = DATA_W'(i);
        b = DATA_W'(j);
        #1;
        checks++;
        if (smaller !== (i < j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d < %0d: got %0b", i, j, smaller);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
