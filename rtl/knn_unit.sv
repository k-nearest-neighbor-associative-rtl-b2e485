// knn_unit: local KNN unit, one per programmable switch.
//
// Holds the class label of the reference vector whose tail precedes it and
// the match-detection flip-flop of the distributed majority vote. A scan
// token (next) runs through all units in array order. A unit takes the token
// when its vector matches and has not been voted yet: it raises act for that
// cycle, puts its label on the class bus and sets its "voted" flip-flop, so
// the token passes it from the next cycle on. A unit without a new match
// passes the token on in the same cycle. The original design describes this
// (D-FF initialised to 0 and compared with the match; next conducted when the
// match is 0; act reads the label storage); the gate-level form is this
// design's own.
//
// Interface: clr (sync) clears the voted flag before a search; cls_wr/cls_din
// write the label; cls_out is the label ANDed with act, to be ORed with the
// other units' outputs. new_match = match and not yet voted, for the array's
// OR tree. act, next_out, cls_out, new_match are combinational.
module knn_unit #(
  parameter int unsigned L = knn_pkg::L
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         match,
  input  logic         next_in,
  output logic         next_out,
  output logic         act,
  output logic         new_match,
  output logic         voted,
  input  logic         cls_wr,
  input  logic [L-1:0] cls_din,
  output logic [L-1:0] cls_out
);

  logic [L-1:0] cls_q;

  assign new_match = match & ~voted;
  assign act       = next_in & new_match;
  assign next_out  = next_in & ~new_match;
  assign cls_out   = act ? cls_q : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   voted <= 1'b0;
    else if (clr) voted <= 1'b0;
    else if (act) voted <= 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      cls_q <= '0;
    else if (cls_wr) cls_q <= cls_din;
  end

endmodule
