// input_reg: 8-bit radicand register that shifts two places per clock.
//
// ld_io loads the radicand from the outside; shift_data shifts the register
// left by two bits, filling with zeros, so that the next pair of radicand bits
// always sits in the two most significant positions, pair_o. Once the four
// radicand pairs are used up, the zeros shifted in act as the two pairs of
// fraction bits. is_zero_o tells the controller that the leading pair is zero.
// ld_io has priority over shift_data. There is no reset: ld_io initialises it.
//
// Timing: the datapath registers of this machine are clocked on the falling
// edge of clk while the controller uses the rising edge, as in the original
// design, so a register updated in the middle of a state is seen by the
// controller's decision at the end of that same state.
module input_reg
  import sqrt_pkg::*;
(
  input  logic              clk,
  input  logic              ld_io,
  input  logic              shift_data,
  input  logic [DATA_W-1:0] data_i,
  output logic [1:0]        pair_o,
  output logic              is_zero_o
);

  logic [DATA_W-1:0] q;

  always_ff @(negedge clk) begin
    if (ld_io)
      q <= data_i;
    else if (shift_data)
      q <= {q[DATA_W-3:0], 2'b00};
  end

  assign pair_o    = q[DATA_W-1 -: 2];
  assign is_zero_o = (pair_o == 2'b00);

endmodule
