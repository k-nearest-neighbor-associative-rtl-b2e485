// knn_top: K-nearest-neighbour classifier built as a reconfigurable
// word-parallel associative memory.
//
// ROWS x COLS elements each hold one N-bit reference component and one
// input component. Programmable switches between the elements group them
// into reference vectors of any length. For a query, every element computes
// its squared component difference (DCU) and adds it to its E-bit partial
// distance (DEC); vectors longer than the array are handled by loading them
// in parts and accumulating. The nearest vectors are then found without
// adders or comparators across elements: a clock-mapping search counts
// clocks into per-element weighted counters (DEU), starting with the most
// significant distance bit and moving one bit down (bit activator) each time
// some vector matches, so the worst case grows linearly with the word width.
// Vectors that match at the LSB are the nearest; local KNN units pass their
// class labels to a global majority vote, and the search continues until k
// neighbours have voted, each further neighbour by a fresh search over the
// vectors not voted yet. class_out is the class with most votes.
//
// Host interface (this design's own): one command per cycle while busy is
// low, see knn_pkg::cmd_op_t. done pulses when a search has finished;
// class_out, knn_sel, nn_match and search_clocks then hold the result until
// the next search. nn_match marks, at each vector's tail element, the
// vector(s) found nearest; knn_sel marks the k vectors that voted.
// search_clocks is the number of search clocks until the nearest vector was
// found (worst case 2N x (d+1) - 1 when the search starts at bit 2N-1).
module knn_top
  import knn_pkg::*;
#(
  parameter int unsigned ROWS = 32,
  parameter int unsigned COLS = 8,
  parameter int unsigned NE   = ROWS * COLS,
  parameter int unsigned AW   = $clog2(NE)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cmd_valid,
  input  cmd_op_t       cmd_op,
  input  logic [AW-1:0] cmd_addr,
  input  logic [N-1:0]  cmd_data,
  output logic          busy,
  output logic          done,
  output logic [L-1:0]  class_out,
  output logic [NE-1:0] nn_match,
  output logic [NE-1:0] knn_sel,
  output logic [15:0]   search_clocks
);

  logic             wr_ref, wr_in, wr_cs, wr_cls;
  logic [AW-1:0]    addr;
  logic [N-1:0]     wdata;
  logic             dcu_start, dec_clr, dcu_done;
  logic             srch_clr, cnt_clr, any_new, all_voted;
  logic             vote_en, act_any, scan_end;
  logic [L-1:0]     cls_bus;
  logic [E-1:0]     bas;
  logic             cnt_en, lsb_hit, run, ba_load;
  logic [LVL_W-1:0] top_bit, level;
  logic [15:0]      clocks;
  logic             mvc_clr, end_o;
  logic [PW-1:0]    k, c1;
  logic [PW-1:0]    votes [NCLS];
  logic             nn_capture;
  logic [NE-1:0]    tail_match, cs;

  knn_ctrl #(.AW(AW), .CLK_W(16)) u_ctrl (
    .clk, .rst_n, .cmd_valid, .cmd_op, .cmd_addr, .cmd_data, .busy, .done,
    .wr_ref, .wr_in, .wr_cs, .wr_cls, .addr, .wdata,
    .dcu_start, .dec_clr, .dcu_done, .srch_clr, .cnt_clr, .scan_end, .all_voted, .vote_en,
    .ba_load, .top_bit, .run, .lsb_hit, .clocks,
    .mvc_clr, .k, .end_o, .nn_capture, .first_clocks(search_clocks)
  );

  knn_rasm #(.ROWS(ROWS), .COLS(COLS), .N(N), .E(E), .L(L), .NE(NE), .AW(AW)) u_rasm (
    .clk, .rst_n, .wr_ref, .wr_in, .wr_cs, .wr_cls, .addr, .wdata,
    .dcu_start, .dec_clr, .dcu_done, .srch_clr, .cnt_clr, .bas, .cnt_en, .any_new, .all_voted,
    .vote_en, .act_any, .cls_bus, .scan_end, .tail_match, .voted(knn_sel), .cs
  );

  knn_ba #(.E(E), .LVL_W(LVL_W), .CLK_W(16)) u_ba (
    .clk, .rst_n, .load(ba_load), .top_bit, .run, .any_match(any_new),
    .bas, .cnt_en, .lsb_hit, .level, .clocks
  );

  knn_mvc #(.L(L), .PW(PW)) u_mvc (
    .clk, .rst_n, .clr(mvc_clr), .k, .vote(act_any), .cls(cls_bus),
    .end_o, .class_out, .c1, .votes
  );

  // Global match of the nearest vector(s), captured at the first LSB match.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          nn_match <= '0;
    else if (srch_clr)   nn_match <= '0;
    else if (nn_capture) nn_match <= tail_match;
  end

endmodule
