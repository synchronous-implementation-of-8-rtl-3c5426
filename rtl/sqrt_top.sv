// sqrt_top: synchronous 8-bit square root computer.
//
// Computes the root of an unsigned 8-bit radicand to two binary places by the
// digit-by-digit (pencil-and-paper) method in base 2: the radicand is taken
// two bits at a time from the top, and for each pair one root bit is found by
// testing whether {root so far, 01} fits into the partial remainder.
// root_o holds the root times four: root_o[5:2] is the integer part and
// root_o[1:0] the fraction, so root_o = floor(sqrt(16 * data_i)).
//
// Blocks: InputReg (radicand, shifts two places a clock), IntReg (partial
// remainder), ResultReg (root bits, supplies the trial value), an 8-bit
// Subtractor and Comparator, a 3-bit step counter and the nine-state Moore
// controller. The controller runs on the rising clock edge, the registers on
// the falling edge, as in the original design.
//
// Interface: while idle the machine copies data_i into its input register on
// every falling clock edge, so data_i must be stable from the falling edge
// before the rising edge that sees start high. done_o rises
// with the result on root_o and stays high until start is released. root_o
// keeps the last result until the next operation starts. rst is a
// synchronous, active-high reset of the controller that also clears the
// datapath registers (the latter is this design's choice).
//
// Latency from the rising edge that sees start to the one that raises
// done_o: 15 - z clocks with z leading zero bit-pairs in a nonzero radicand,
// 8 clocks for zero. ONE_HOT selects the controller's state encoding.
module sqrt_top
  import sqrt_pkg::*;
#(
  parameter bit ONE_HOT = 1'b1
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  input  logic [DATA_W-1:0]   data_i,
  output logic [RES_BITS-1:0] root_o,
  output logic                done_o,
  output state_e              state_o
);

  ctrl_t             ctrl;
  logic              clr;
  logic [1:0]        pair;
  logic              is_zero, smaller, ready;
  logic [DATA_W-1:0] rem, trial, diff, result;
  logic [CNT_W-1:0]  count;

  assign clr = ctrl.clr | rst;

  sqrt_fsm #(.ONE_HOT(ONE_HOT)) u_fsm (
    .clk     (clk),
    .rst     (rst),
    .start   (start),
    .is_zero (is_zero),
    .smaller (smaller),
    .ready   (ready),
    .state_o (state_o),
    .ctrl_o  (ctrl)
  );

  input_reg u_input_reg (
    .clk        (clk),
    .ld_io      (ctrl.ld_io),
    .shift_data (ctrl.shift_data),
    .data_i     (data_i),
    .pair_o     (pair),
    .is_zero_o  (is_zero)
  );

  int_reg u_int_reg (
    .clk        (clk),
    .clr        (clr),
    .ld_int_reg (ctrl.ld_int_reg),
    .sel_adder  (ctrl.sel_adder),
    .diff_i     (diff),
    .pair_i     (pair),
    .q_o        (rem)
  );

  result_reg u_result_reg (
    .clk           (clk),
    .clr           (clr),
    .ld_result_reg (ctrl.ld_result_reg),
    .sel_one       (ctrl.sel_one),
    .concat1       (ctrl.concat1),
    .result_o      (result),
    .trial_o       (trial)
  );

  subtractor u_subtractor (
    .a_i    (rem),
    .b_i    (trial),
    .diff_o (diff)
  );

  comparator u_comparator (
    .a_i       (rem),
    .b_i       (trial),
    .smaller_o (smaller)
  );

  step_counter u_step_counter (
    .clk     (clk),
    .clr     (clr),
    .cnt_en  (ctrl.cnt_en),
    .count_o (count),
    .ready_o (ready)
  );

  // ResultReg is 8 bits wide; only its low six bits hold root bits.
  assign root_o = result[RES_BITS-1:0];
  assign done_o = ctrl.done;

  // A subtraction is only ever taken when the trial value fits (checked at the
  // falling edge, where the datapath registers load).
  always_ff @(negedge clk)
    if (!rst && ctrl.sel_adder)
      assert (trial <= rem) else $error("subtracting a trial value that does not fit");

  // The counter never passes the number of result bits.
  always_ff @(posedge clk)
    if (!rst) assert (count <= CNT_W'(RES_BITS)) else $error("step counter overran");

endmodule
