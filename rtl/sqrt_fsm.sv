// sqrt_fsm: nine-state Moore controller of the 8-bit square root computer.
//
// Inputs: Reset (rst, synchronous), Start, IsZero (leading radicand pair is
// zero), Smaller (remainder < trial value) and Ready (all six result bits
// exist). Output: the ctrl_t bundle of datapath controls, a function of the
// state alone. The controller runs on the rising clock edge; the datapath
// registers load on the falling edge, so the flags it reads at the end of a
// state already reflect that state's register loads.
//
// Sequence: IDLE, the initial state, loads the radicand on every clock while
// it waits for Start; CLEAR empties the remainder, result and counter; LEAD
// looks at the leading pair. While leading pairs are zero, SKIP shifts
// them out one per clock and records a 0 result bit without any compare,
// which saves cycles on small radicands. FETCH moves the first nonzero pair
// into the remainder register. Then each result bit takes two clocks: COMP
// compares the remainder with {result,01}, and ONE (it fits: subtract, bit 1)
// or ZERO (it does not: keep the remainder, bit 0) stores the bit and brings
// down the next pair. After six bits Ready sends it to DONE, where done is high
// until Start is released.
//
// Latency, from the clock edge that sees Start in IDLE to the first clock in
// DONE: 15 - z clocks for a nonzero radicand with z leading zero pairs
// (z = 0..3), 8 clocks for a zero radicand.
//
// The original names the five inputs, the Moore style and the count of nine
// states and compares one-hot with binary state encoding; the states and
// their outputs here are this design's own. ONE_HOT selects the encoding of
// the state register: 1 gives nine flip-flops with one bit per state, 0 gives
// a 4-bit binary code.
module sqrt_fsm
  import sqrt_pkg::*;
#(
  parameter bit ONE_HOT = 1'b1
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   start,
  input  logic   is_zero,
  input  logic   smaller,
  input  logic   ready,
  output state_e state_o,
  output ctrl_t  ctrl_o
);

  state_e state, next;

  // Next-state logic.
  always_comb begin
    next = state;
    unique case (state)
      S_IDLE:  if (start) next = S_CLEAR;
      S_CLEAR: next = S_LEAD;
      S_LEAD:  next = is_zero ? S_SKIP : S_FETCH;
      S_SKIP:  next = ready ? S_DONE : (is_zero ? S_SKIP : S_FETCH);
      S_FETCH: next = S_COMP;
      S_COMP:  next = smaller ? S_ZERO : S_ONE;
      S_ONE,
      S_ZERO:  next = ready ? S_DONE : S_COMP;
      S_DONE:  if (!start) next = S_IDLE;
      default: next = S_IDLE;
    endcase
  end

  // State register, in the selected encoding.
  if (ONE_HOT) begin : g_one_hot
    logic [NUM_STATES-1:0] hot;

    always_ff @(posedge clk) begin
      if (rst)
        hot <= NUM_STATES'(1) << S_IDLE;
      else
        hot <= NUM_STATES'(1) << next;
    end

    always_comb begin
      state = S_IDLE;
      for (int i = 0; i < NUM_STATES; i++)
        if (hot[i]) state = state_e'(i);
    end

    always_ff @(posedge clk)
      if (!rst) assert ($onehot(hot)) else $error("state register not one-hot: %b", hot);
  end else begin : g_binary
    always_ff @(posedge clk) begin
      if (rst)
        state <= S_IDLE;
      else
        state <= next;
    end
  end

  // Moore outputs.
  always_comb begin
    ctrl_o = '0;
    unique case (state)
      S_IDLE: begin
        ctrl_o.ld_io = 1'b1;
      end
      S_CLEAR: begin
        ctrl_o.clr = 1'b1;
      end
      S_SKIP: begin
        ctrl_o.shift_data    = 1'b1;
        ctrl_o.ld_result_reg = 1'b1;
        ctrl_o.cnt_en        = 1'b1;
      end
      S_FETCH: begin
        ctrl_o.ld_int_reg = 1'b1;
        ctrl_o.shift_data = 1'b1;
      end
      S_COMP: begin
        ctrl_o.concat1 = 1'b1;
      end
      S_ONE: begin
        ctrl_o.concat1       = 1'b1;
        ctrl_o.ld_int_reg    = 1'b1;
        ctrl_o.sel_adder     = 1'b1;
        ctrl_o.shift_data    = 1'b1;
        ctrl_o.ld_result_reg = 1'b1;
        ctrl_o.sel_one       = 1'b1;
        ctrl_o.cnt_en        = 1'b1;
      end
      S_ZERO: begin
        ctrl_o.ld_int_reg    = 1'b1;
        ctrl_o.shift_data    = 1'b1;
        ctrl_o.ld_result_reg = 1'b1;
        ctrl_o.cnt_en        = 1'b1;
      end
      S_DONE: begin
        ctrl_o.done = 1'b1;
      end
      default: ;
    endcase
  end

  assign state_o = state;

endmodule
