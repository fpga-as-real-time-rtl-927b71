// Deglitcher and rising-edge detector for an external signal.
//
// The raw input is shifted into a LEN-bit register on every clock. The
// register all ones means a stable high level, all zeros a stable low level;
// any mix keeps the previous level, so a glitch shorter than LEN cycles never
// changes the level. level_o is that cleaned level. edge_o is high for one
// cycle when the register becomes all ones while the stored level is still
// low, i.e. on each clean low-to-high transition. The shift register also
// serves as the synchroniser of the asynchronous input.
//
// Timing: when sig_i goes high and is first sampled on clock edge t, and
// stays high, edge_o rises on clock edge t+LEN and stays high one cycle (LEN
// cycles of latency). The latency is the same for every edge, so intervals
// between edges are preserved. A level (high or low) must last at least LEN
// cycles to count.
//
// The shift register, the all-ones / all-zeros test and the comparison of
// the new level against the stored one follow the lab; the length LEN = 8
// (64 ns at 125 MHz) and the reset to low level are this design's choices.
// Reset is asynchronous, active high.
module debounce_edge #(
  parameter int unsigned LEN = 8
) (
  input  logic clk,
  input  logic rst,
  input  logic sig_i,
  output logic level_o,
  output logic edge_o
);

  logic [LEN-1:0] shift_q;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      shift_q <= '0;
      level_o <= 1'b0;
      edge_o  <= 1'b0;
    end else begin
      shift_q <= {shift_q[LEN-2:0], sig_i};
      edge_o  <= 1'b0;
      if (&shift_q) begin
        level_o <= 1'b1;
        edge_o  <= !level_o;
      end else if (~|shift_q) begin
        level_o <= 1'b0;
      end
    end
  end

endmodule
