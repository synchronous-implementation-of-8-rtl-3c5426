// int_reg: the partial remainder register ("intermediate register").
//
// On a falling clock edge with ld_int_reg high it loads a new partial
// remainder built from a source word and the next radicand pair:
//   q <= {src[5:0], pair_i},  src = sel_adder ? diff_i : q
// so sel_adder picks the subtractor output (the trial value fitted) or the
// register's own value (it did not). Appending the pair shifts the source left
// by two, which is step 6 of the pencil-and-paper method: bring down the next
// pair of digits. Only six source bits are kept: whenever the shifted value is
// used again the remainder is below 2*31+1 and fits in six bits.
// clr (synchronous, highest priority) empties the register at the start of an
// operation. The mux and the shift-in of the pair are this design's reading of
// how the remainder and the next pair are joined; the original names only the
// two controls.
module int_reg
  import sqrt_pkg::*;
(
  input  logic              clk,
  input  logic              clr,
  input  logic              ld_int_reg,
  input  logic              sel_adder,
  input  logic [DATA_W-1:0] diff_i,
  input  logic [1:0]        pair_i,
  output logic [DATA_W-1:0] q_o
);

  logic [DATA_W-1:0] src;

  always_comb src = sel_adder ? diff_i : q_o;

  always_ff @(negedge clk) begin
    if (clr)
      q_o <= '0;
    else if (ld_int_reg)
      q_o <= {src[DATA_W-3:0], pair_i};
  end

endmodule
