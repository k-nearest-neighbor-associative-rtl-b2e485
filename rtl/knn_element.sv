// knn_element: one element of the reconfigurable associative memory.
//
// An element stores one N-bit reference component (the SRAM word of the
// chip) and the matching N-bit input component, computes their squared
// difference in its DCU, accumulates it in its DEC and evaluates the partial
// distance in its DEU during the search. Elements are chained through
// programmable switches; match_in/cnt_in come from the switch on the left,
// match_out/cnt_out go to the switch on the right.
//
// The original design gives the content of an element (storage for p components,
// p distance computing units and one DEU); p = 1 as in the prototype's
// 256-word parallelism. That the input component is held in a register of
// the element, written by the host, is this design's choice.
//
// Timing: dcu_start starts the N-cycle SAD computation; the edge at which the
// DCU shows done adds the SAD to the DEC, so pdist holds it one cycle later.
module knn_element #(
  parameter int unsigned N = knn_pkg::N,
  parameter int unsigned E = knn_pkg::E
) (
  input  logic         clk,
  input  logic         rst_n,
  // host writes
  input  logic         wr_ref,
  input  logic         wr_in,
  input  logic [N-1:0] wdata,
  // distance computation
  input  logic         dcu_start,
  input  logic         dec_clr,
  output logic         dcu_done,
  // search
  input  logic         deu_clr,
  input  logic [E-1:0] bas,
  input  logic         cnt_in,
  input  logic         match_in,
  output logic         cnt_out,
  output logic         match_out,
  output logic [E-1:0] pdist
);

  logic [N-1:0]   ref_q, in_q;
  logic [2*N-1:0] sad;
  logic [E-1:0]   cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_q <= '0;
      in_q  <= '0;
    end else begin
      if (wr_ref) ref_q <= wdata;
      if (wr_in)  in_q  <= wdata;
    end
  end

  knn_dcu #(.N(N)) u_dcu (
    .clk, .rst_n, .start(dcu_start), .ref_w(ref_q), .in_w(in_q),
    .sad, .done(dcu_done)
  );

  knn_dec #(.E(E), .SAD_W(2*N)) u_dec (
    .clk, .rst_n, .clr(dec_clr), .acc(dcu_done), .sad, .pdist
  );

  knn_deu #(.E(E)) u_deu (
    .clk, .rst_n, .clr(deu_clr), .bas, .pdist, .cnt_in, .match_in,
    .cnt_out, .match_out, .cnt
  );

endmodule
