// knn_ps: programmable switch (PS) between two neighbouring elements.
//
// A one-bit configuring signal CS decides whether the elements on both
// sides belong to the same reference vector. With CS = 1 the match signal
// and the counting clock of the left element go on to the right element and
// the KNN match output is held at 0, so the local KNN unit stays idle. With
// CS = 0 the left element is the tail of a vector: its match goes to the
// local KNN unit, and the right element becomes the head of the next vector,
// receiving match = 1 and the global counting clock. This follows the
// original description of CS; that a head sees match = 1 and the global
// clock is this design's reading of it.
//
// CS is held in a flip-flop written by the host (cs_wr/cs_din), reset to 0
// so that after reset every element is a one-component vector. With
// FIXED_TAIL = 1 the switch is always a tail (used after the last element).
module knn_ps #(
  parameter bit FIXED_TAIL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic cs_wr,
  input  logic cs_din,
  input  logic match_l,    // match from the left element
  input  logic cnt_l,      // counting clock from the left element
  input  logic cnt_head,   // global counting clock for vector heads
  output logic match_r,    // to the right element
  output logic cnt_r,      // to the right element
  output logic match_knn,  // Match_KNN to the local KNN unit
  output logic cs          // current configuration
);

  logic cs_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     cs_q <= 1'b0;
    else if (cs_wr) cs_q <= cs_din;
  end

  assign cs        = FIXED_TAIL ? 1'b0 : cs_q;
  assign match_r   = cs ? match_l : 1'b1;
  assign cnt_r     = cs ? cnt_l   : cnt_head;
  assign match_knn = cs ? 1'b0    : match_l;

endmodule
