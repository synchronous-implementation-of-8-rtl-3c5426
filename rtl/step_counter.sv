// step_counter: 3-bit counter of result bits produced.
//
// It counts up on each falling clock edge with cnt_en high and is cleared
// synchronously by clr. ready_o goes high once STEPS result bits exist; the
// controller then stops. STEPS defaults to six: four integer and two fraction
// bits of the root. The 3-bit width and the Ready output follow the original
// design; counting every result bit, including the skipped leading zeros,
// and the clear and enable inputs are this design's choices.
module step_counter
  import sqrt_pkg::*;
#(
  parameter int unsigned STEPS = RES_BITS
) (
  input  logic             clk,
  input  logic             clr,
  input  logic             cnt_en,
  output logic [CNT_W-1:0] count_o,
  output logic             ready_o
);

  always_ff @(negedge clk) begin
    if (clr)
      count_o <= '0;
    else if (cnt_en)
      count_o <= count_o + 1'b1;
  end

  assign ready_o = (count_o == CNT_W'(STEPS));

endmodule
