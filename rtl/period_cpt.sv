// Period counter: counts clock periods since the last detected edge.
//
// On every clock, cpt_o is cleared to 0 when edge_i is high and incremented
// (wrapping modulo 2**W) otherwise. Read on the cycle where edge_i is high,
// cpt_o therefore holds P - 1 for two edges P cycles apart (the clearing
// cycle counts as 0). With W = 32 at 125 MHz it covers intervals up to
// 2**32 * 8 ns, about 34 s.
//
// The clear-on-edge / increment-otherwise rule and the 32-bit width follow
// the lab. Reset (asynchronous, active high) clears the counter.
module period_cpt #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         edge_i,
  output logic [W-1:0] cpt_o
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)         cpt_o <= '0;
    else if (edge_i) cpt_o <= '0;
    else             cpt_o <= cpt_o + 1'b1;
  end

endmodule
