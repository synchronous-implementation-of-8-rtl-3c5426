// tb_result_reg: self-check of the result shift register.
// Random clear, load, SelOne and Concat1 commands are applied; after each
// falling edge the register is compared with an integer model (clear gives 0,
// a load gives (2*r + bit) mod 256) and the trial output with
// (r mod 64)*4 + 1 when Concat1 is high and 0 when it is low.
module tb_result_reg;
  import sqrt_pkg::*;

  logic clk = 1'b0;
  logic clr, ld, sel_one, concat1;
  logic [DATA_W-1:0] result, trial;
  int model = 0;
  int checks = 0, failures = 0;
  int n_one = 0, n_zero = 0, n_clr = 0;

  always #5 clk = ~clk;

  result_reg dut (.clk(clk), .clr(clr), .ld_result_reg(ld), .sel_one(sel_one),
                  .concat1(concat1), .result_o(result), .trial_o(trial));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_trial;
    clr = 1'b1; ld = 1'b0; sel_one = 1'b0; concat1 = 1'b0;
    model = 0;
    @(posedge clk);
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      #1;
      exp_trial = concat1 ? (model % 64) * 4 + 1 : 0;
      checks += 2;
      if (int'(result) != model) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: result %0d expected %0d", n, result, model);
      end
      if (int'(trial) != exp_trial) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: trial %0d expected %0d", n, trial, exp_trial);
      end
      @(posedge clk);
      #1;
      clr     = ($urandom_range(0, 15) == 0);
      ld      = ($urandom_range(0, 3) != 0);
      sel_one = $urandom_range(0, 1) == 1;
      concat1 = $urandom_range(0, 1) == 1;
      if (clr) begin
        model = 0; n_clr++;
      end else if (ld) begin
        model = (model * 2 + (sel_one ? 1 : 0)) % 256;
        if (sel_one) n_one++; else n_zero++;
      end
    end
    if (n_one == 0 || n_zero == 0 || n_clr == 0) begin
      failures++;
      $display("coverage hole");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
