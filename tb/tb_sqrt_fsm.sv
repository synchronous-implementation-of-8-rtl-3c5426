// tb_sqrt_fsm: self-check of the nine-state controller in both state
// encodings (one-hot and binary), side by side on the same random inputs.
// The expected next state comes from a transition table written out below
// and the expected Moore outputs from a per-state bit pattern, in the order
// {ld_io, shift_data, ld_int_reg, sel_adder, ld_result_reg, sel_one,
//  concat1, clr, cnt_en, done}. Every state must be visited.
module tb_sqrt_fsm;
  import sqrt_pkg::*;

  logic clk = 1'b0;
  logic rst, start, is_zero, smaller, ready;
  state_e st_oh, st_bin;
  ctrl_t  c_oh, c_bin;
  int checks = 0, failures = 0;
  int visits [NUM_STATES];
  int model;

  always #5 clk = ~clk;

  sqrt_fsm #(.ONE_HOT(1'b1)) dut_oh (.clk(clk), .rst(rst), .start(start), .is_zero(is_zero),
    .smaller(smaller), .ready(ready), .state_o(st_oh), .ctrl_o(c_oh));
  sqrt_fsm #(.ONE_HOT(1'b0)) dut_bin (.clk(clk), .rst(rst), .start(start), .is_zero(is_zero),
    .smaller(smaller), .ready(ready), .state_o(st_bin), .ctrl_o(c_bin));

  // Expected outputs per state number (IDLE=0 ... DONE=8).
  function automatic logic [9:0] outputs_of(int s);
    case (s)
      0:       return 10'b1000000000; // IDLE
      1:       return 10'b0000000100; // CLEAR
      3:       return 10'b0100100010; // SKIP
      4:       return 10'b0110000000; // FETCH
      5:       return 10'b0000001000; // COMP
      6:       return 10'b0111111010; // ONE
      7:       return 10'b0110100010; // ZERO
      8:       return 10'b0000000001; // DONE
      default: return 10'b0000000000; // LEAD
    endcase
  endfunction

  function automatic int next_of(int s, logic st, logic z, logic sm, logic rd);
    case (s)
      0: return st ? 1 : 0;
      1: return 2;
      2: return z ? 3 : 4;
      3: return rd ? 8 : (z ? 3 : 4);
      4: return 5;
      5: return sm ? 7 : 6;
      6, 7: return rd ? 8 : 5;
      8: return st ? 8 : 0;
      default: return 0;
    endcase
  endfunction

  task automatic check_now();
    checks += 4;
    if (int'(st_oh) != model) begin
      failures++; if (failures < 10) $display("FAIL one-hot state %0d expected %0d", st_oh, model);
    end
    if (int'(st_bin) != model) begin
      failures++; if (failures < 10) $display("FAIL binary state %0d expected %0d", st_bin, model);
    end
    if (c_oh != outputs_of(model)) begin
      failures++; if (failures < 10) $display("FAIL one-hot outputs %b in state %0d", c_oh, model);
    end
    if (c_bin != outputs_of(model)) begin
      failures++; if (failures < 10) $display("FAIL binary outputs %b in state %0d", c_bin, model);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; start = 1'b0; is_zero = 1'b0; smaller = 1'b0; ready = 1'b0;
    model = 0;
    repeat (2) @(posedge clk);
    #1;
    check_now();
    @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 10000; n++) begin
      // inputs change at the falling edge, as the datapath flags do
      start   = ($urandom_range(0, 2) != 0);
      is_zero = $urandom_range(0, 1) == 1;
      smaller = $urandom_range(0, 1) == 1;
      ready   = ($urandom_range(0, 4) == 0);
      @(posedge clk);
      model = next_of(model, start, is_zero, smaller, ready);
      visits[model]++;
      #1;
      check_now();
      @(negedge clk);
    end
    // a reset in the middle returns to IDLE
    rst = 1'b1;
    @(posedge clk);
    model = 0;
    #1;
    check_now();
    for (int s = 0; s < NUM_STATES; s++) begin
      checks++;
      if (visits[s] == 0) begin
        failures++;
        $display("coverage hole: state %0d never visited", s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
