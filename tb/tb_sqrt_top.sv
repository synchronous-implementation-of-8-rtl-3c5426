// tb_sqrt_top: end-to-end self-check of the square root computer at its
// default parameters.
//
// Every radicand 0..255 is computed, in random order, and the result compared
// with floor(sqrt(16*x)) found by integer search; the number of clocks from
// Start to Done is compared with 15 - z (z = leading zero bit-pairs) or 8 for
// zero. It also runs back-to-back operations with Start held only one clock,
// and a reset in the middle of an operation. Each mechanism of the machine
// is counted and must occur: leading-pair skipping, a fitting trial
// (subtract, bit 1), a non-fitting trial (bit 0), a radicand of zero that
// is skipped to the end, and the mid-operation reset.
module tb_sqrt_top;
  import sqrt_pkg::*;

  logic clk = 1'b0;
  logic rst, start;
  logic [DATA_W-1:0] data;
  logic [RES_BITS-1:0] root;
  logic done;
  state_e state;
  int checks = 0, failures = 0;
  int n_skip = 0, n_one = 0, n_zero = 0, n_zero_input = 0, n_reset = 0;
  int order [256];

  always #5 clk = ~clk;

  sqrt_top dut (.clk(clk), .rst(rst), .start(start), .data_i(data),
                .root_o(root), .done_o(done), .state_o(state));

  // count the mechanisms as they happen
  always @(posedge clk) begin
    if (!rst) begin
      if (state == S_SKIP) n_skip++;
      if (state == S_ONE)  n_one++;
      if (state == S_ZERO) n_zero++;
    end
  end

  function automatic int isqrt(int v);
    int r = 0;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  function automatic int expected_latency(int x);
    int z = 0;
    if (x == 0) return 8;
    while (((x >> (6 - 2 * z)) & 3) == 0) z++;
    return 15 - z;
  endfunction

  // one operation; start held until done when hold is set, else one clock
  task automatic run_one(int x, bit hold);
    int cycles = 0;
    // the radicand is loaded in IDLE at the falling edge before the rising
    // edge that sees start
    @(posedge clk);
    #1;
    data  = DATA_W'(x);
    start = 1'b1;
    @(posedge clk);
    #1;
    if (!hold) start = 1'b0;
    while (!done && cycles < 100) begin
      @(posedge clk);
      #1;
      cycles++;
    end
    checks += 2;
    if (int'(root) != isqrt(16 * x)) begin
      failures++;
      if (failures < 10) $display("FAIL sqrt(%0d): root %0d expected %0d", x, root, isqrt(16 * x));
    end
    if (cycles != expected_latency(x)) begin
      failures++;
      if (failures < 10) $display("FAIL sqrt(%0d): %0d clocks expected %0d", x, cycles, expected_latency(x));
    end
    if (x == 0) n_zero_input++;
    @(negedge clk);
    start = 1'b0;
    @(posedge clk);
    #1;
    checks++;
    if (done) begin
      failures++;
      $display("FAIL done still high after start released");
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
    rst = 1'b1; start = 1'b0; data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    // worked example: sqrt(200) = 14.14..., root*4 = 56 = 1110.00b
    run_one(200, 1'b1);
    // all radicands in a shuffled order
    for (int i = 0; i < 256; i++) order[i] = i;
    for (int i = 255; i > 0; i--) begin
      int j, t;
      j = $urandom_range(0, i);
      t = order[i];
      order[i] = order[j];
      order[j] = t;
    end
    for (int i = 0; i < 256; i++) run_one(order[i], 1'b1);
    // short start pulses
    for (int i = 0; i < 20; i++) run_one($urandom_range(0, 255), 1'b0);
    // reset in the middle of an operation, then a clean operation
    @(posedge clk);
    #1;
    data = 8'hFF; start = 1'b1;
    repeat (6) @(posedge clk);
    @(negedge clk);
    rst = 1'b1; start = 1'b0;
    @(posedge clk);
    #1;
    checks += 2;
    if (state != S_IDLE) begin
      failures++; $display("FAIL reset did not return to IDLE");
    end
    if (root != '0) begin
      failures++; $display("FAIL reset did not clear the result");
    end
    n_reset++;
    @(negedge clk);
    rst = 1'b0;
    run_one(255, 1'b1);
    // every mechanism must have happened
    checks += 5;
    if (n_skip == 0)       begin failures++; $display("coverage hole: leading-pair skip"); end
    if (n_one == 0)        begin failures++; $display("coverage hole: fitting trial"); end
    if (n_zero == 0)       begin failures++; $display("coverage hole: non-fitting trial"); end
    if (n_zero_input == 0) begin failures++; $display("coverage hole: zero radicand"); end
    if (n_reset == 0)      begin failures++; $display("coverage hole: mid-operation reset"); end
    $display("mechanisms: skip=%0d one=%0d zero=%0d zero_input=%0d reset=%0d",
             n_skip, n_one, n_zero, n_zero_input, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
