// tb_input_reg: self-check of the two-place input shift register.
// Random load and shift commands are applied on the rising clock edge; after
// each falling edge (where the register loads) the leading pair and the
// IsZero flag are compared with an integer model: load sets it to the data,
// shift multiplies it by four modulo 256, load wins over shift.
module tb_input_reg;
  import sqrt_pkg::*;

  logic clk = 1'b0;
  logic ld_io, shift_data;
  logic [DATA_W-1:0] data;
  logic [1:0] pair;
  logic is_zero;
  int model = 0;
  int checks = 0, failures = 0;
  int n_load = 0, n_shift = 0, n_zero = 0;

  always #5 clk = ~clk;

  input_reg dut (.clk(clk), .ld_io(ld_io), .shift_data(shift_data), .data_i(data),
                 .pair_o(pair), .is_zero_o(is_zero));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld_io = 1'b1; shift_data = 1'b0; data = 8'hC5;
    model = 'hC5;
    @(posedge clk);
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      #1;
      checks++;
      if (int'(pair) != (model >> 6) || is_zero != ((model >> 6) == 0)) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: pair %0d is_zero %0b, model %02h", n, pair, is_zero, model);
      end
      @(posedge clk);
      #1;
      ld_io      = ($urandom_range(0, 4) == 0);
      shift_data = ($urandom_range(0, 3) != 0);
      data       = DATA_W'($urandom);
      if (ld_io) begin
        model = int'(data);
        n_load++;
      end else if (shift_data) begin
        model = (model * 4) % 256;
        n_shift++;
      end
      if ((model >> 6) == 0) n_zero++;
    end
    if (n_load == 0 || n_shift == 0 || n_zero == 0) begin
      failures++;
      $display("coverage hole: loads %0d shifts %0d zero pairs %0d", n_load, n_shift, n_zero);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
