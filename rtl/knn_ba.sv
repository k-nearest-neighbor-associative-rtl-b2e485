// knn_ba: bit activator (BA) of the clock-mapping search.
//
// Holds the lowest distance bit currently taking part in the search and
// drives it as the one-hot bit-activator signal bas to all DEUs. The search
// starts at bit top_bit. While no vector matches, every cycle is a counting
// cycle (cnt_en). A cycle in which the OR tree reports a match is a
// non-counting cycle: above the LSB it is the cycle in which the BA
// generates the next BAS, so at its end the search moves one bit down and
// counting resumes from the first component; at the LSB it is the final
// match (lsb_hit) and the winner is found. The rule "each level costs at
// most d counting cycles plus one BAS cycle" gives the published worst case
// of 2N x (d+1) - 1 clocks for a search that starts at bit 2N-1.
//
// clocks counts the counting and BAS cycles of the search since load (the
// final match cycle at the LSB is not counted); it saturates.
//
// Interface: load (sync) sets the level to top_bit and clears clocks; run
// enables the search. cnt_en and lsb_hit are combinational in any_match.
module knn_ba #(
  parameter int unsigned E     = knn_pkg::E,
  parameter int unsigned LVL_W = $clog2(E),
  parameter int unsigned CLK_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [LVL_W-1:0] top_bit,
  input  logic             run,
  input  logic             any_match,
  output logic [E-1:0]     bas,
  output logic             cnt_en,
  output logic             lsb_hit,
  output logic [LVL_W-1:0] level,
  output logic [CLK_W-1:0] clocks
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      level  <= '0;
      clocks <= '0;
    end else if (load) begin
      level  <= (32'(top_bit) < E) ? top_bit : LVL_W'(E - 1);
      clocks <= '0;
    end else if (run && !lsb_hit) begin
      if (any_match) level <= level - 1'b1;
      if (clocks != '1) clocks <= clocks + 1'b1;
    end
  end

  assign bas     = E'(1) << level;
  assign cnt_en  = run & ~any_match;
  assign lsb_hit = run & any_match & (level == '0);

endmodule
