// tb_step_counter: self-check of the 3-bit step counter.
// Random clear and count-enable commands; after each falling edge the count is
// compared with an integer model (mod 8) and Ready with "count equals 6".
module tb_step_counter;
  import sqrt_pkg::*;

  logic clk = 1'b0;
  logic clr, en;
  logic [CNT_W-1:0] count;
  logic ready;
  int model = 0;
  int checks = 0, failures = 0, n_ready = 0;

  always #5 clk = ~clk;

  step_counter dut (.clk(clk), .clr(clr), .cnt_en(en), .count_o(count), .ready_o(ready));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1'b1; en = 1'b0; model = 0;
    @(posedge clk);
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      #1;
      checks += 2;
      if (int'(count) != model) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: count %0d expected %0d", n, count, model);
      end
      if (ready != (model == 6)) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: ready %0b at count %0d", n, ready, model);
      end
      if (model == 6) n_ready++;
      @(posedge clk);
      #1;
      clr = ($urandom_range(0, 11) == 0);
      en  = ($urandom_range(0, 3) != 0);
      if (clr) model = 0;
      else if (en) model = (model + 1) % 8;
    end
    if (n_ready == 0) begin
      failures++;
      $display("coverage hole: Ready never seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
