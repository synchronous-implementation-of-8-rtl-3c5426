// sqrt_pkg: widths, controller states and the control-signal bundle shared by
// the 8-bit square root computer.
//
// The machine takes an 8-bit unsigned radicand and produces a 6-bit root:
// 4 integer bits and 2 bits after the binary point (root = result / 4).
// The datapath words are 8 bits wide, as in the original design. The state
// names and the grouping of the control lines into one struct are this
// design's own; the control line names (LdIO, ShiftData, LdIntReg, SelAdder,
// LdResultReg, SelOne, Concat1) are those of the original design.
package sqrt_pkg;

  // Width of the radicand and of every datapath register.
  localparam int unsigned DATA_W    = 8;
  // Result bits computed: 4 integer bits plus 2 fraction bits.
  localparam int unsigned INT_BITS  = 4;
  localparam int unsigned FRAC_BITS = 2;
  localparam int unsigned RES_BITS  = INT_BITS + FRAC_BITS;
  // Width of the step counter.
  localparam int unsigned CNT_W     = 3;

  // Controller states. Nine states, Moore outputs only.
  typedef enum logic [3:0] {
    S_IDLE  = 4'd0,  // initial state: load radicand, wait for Start
    S_CLEAR = 4'd1,  // clear remainder, result and counter
    S_LEAD  = 4'd2,  // decide: leading zero pair or first real step
    S_SKIP  = 4'd3,  // leading zero pair: shift input, result bit 0
    S_FETCH = 4'd4,  // bring first nonzero pair into the remainder register
    S_COMP  = 4'd5,  // compare remainder with {result,01}
    S_ONE   = 4'd6,  // trial fits: subtract, result bit 1, next pair
    S_ZERO  = 4'd7,  // trial too big: keep remainder, result bit 0, next pair
    S_DONE  = 4'd8   // result valid, wait for Start to drop
  } state_e;

  localparam int unsigned NUM_STATES = 9;

  // Moore outputs of the controller.
  typedef struct packed {
    logic ld_io;         // InputReg: load the radicand
    logic shift_data;    // InputReg: shift left by two places
    logic ld_int_reg;    // IntReg: clock enable
    logic sel_adder;     // IntReg: 1 = load subtractor output, 0 = own value
    logic ld_result_reg; // ResultReg: clock enable (shift in one bit)
    logic sel_one;       // ResultReg: bit shifted in is 1 (else 0)
    logic concat1;       // ResultReg: drive {result[5:0],01} as trial value
    logic clr;           // clear IntReg, ResultReg and the step counter
    logic cnt_en;        // step counter: count one result bit
    logic done;          // result is valid
  } ctrl_t;

endpackage
