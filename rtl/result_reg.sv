// result_reg: 8-bit shift register that collects the root, one bit per step.
//
// On a falling clock edge with ld_result_reg high the register shifts left by
// one and takes sel_one as its new least significant bit. Six of the eight
// bits are used: result_o[5:2] is the integer part of the root and
// result_o[1:0] its two fraction bits. clr (synchronous, highest priority)
// empties the register at the start of an operation.
//
// trial_o is the value the comparator and the subtractor need in step 4 of the
// method: twice the root so far, times two again, plus one, i.e. {q[5:0],01}.
// The register is not shifted for this; the bits are only rewired. concat1
// enables this trial value; while it is low trial_o is zero (this gating is
// this design's reading of Concat1, whose exact effect the original leaves
// open).
module result_reg
  import sqrt_pkg::*;
(
  input  logic              clk,
  input  logic              clr,
  input  logic              ld_result_reg,
  input  logic              sel_one,
  input  logic              concat1,
  output logic [DATA_W-1:0] result_o,
  output logic [DATA_W-1:0] trial_o
);

  always_ff @(negedge clk) begin
    if (clr)
      result_o <= '0;
    else if (ld_result_reg)
      result_o <= {result_o[DATA_W-2:0], sel_one};
  end

  assign trial_o = concat1 ? {result_o[DATA_W-3:0], 2'b01} : '0;

endmodule
