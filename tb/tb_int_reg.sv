// tb_int_reg: self-check of the partial remainder register.
// Random clear, load and select commands and random subtractor words and
// radicand pairs are applied; after each falling edge the register is compared
// with an integer model: clear gives 0, a load gives
// ((selected source) mod 64) * 4 + pair, where the source is the subtractor
// word when SelAdder is high and the old value otherwise.
module tb_int_reg;
  import sqrt_pkg::*;

  logic clk = 1'b0;
  logic clr, ld, sel;
  logic [DATA_W-1:0] diff, q;
  logic [1:0] pair;
  int model = 0;
  int checks = 0, failures = 0;
  int n_sub = 0, n_keep = 0, n_clr = 0, n_hold = 0;

  always #5 clk = ~clk;

  int_reg dut (.clk(clk), .clr(clr), .ld_int_reg(ld), .sel_adder(sel),
               .diff_i(diff), .pair_i(pair), .q_o(q));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1'b1; ld = 1'b0; sel = 1'b0; diff = '0; pair = '0;
    model = 0;
    @(posedge clk);
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      #1;
      checks++;
      if (int'(q) != model) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: got %0d expected %0d", n, q, model);
      end
      @(posedge clk);
      #1;
      clr  = ($urandom_range(0, 9) == 0);
      ld   = ($urandom_range(0, 3) != 0);
      sel  = $urandom_range(0, 1) == 1;
      diff = DATA_W'($urandom);
      pair = 2'($urandom);
      if (clr) begin
        model = 0; n_clr++;
      end else if (ld) begin
        model = ((sel ? int'(diff) : model) % 64) * 4 + int'(pair);
        if (sel) n_sub++; else n_keep++;
      end else begin
        n_hold++;
      end
    end
    if (n_sub == 0 || n_keep == 0 || n_clr == 0 || n_hold == 0) begin
      failures++;
      $display("coverage hole");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
