// knn_rasm: the reconfigurable associative memory array.
//
// ROWS x COLS elements form one chain in row-major order (element
// r*COLS + c), so a vector longer than a row continues in the next row. After
// every element sits a programmable switch and a local KNN unit. A switch
// with CS = 1 joins its two neighbours into one vector; CS = 0 ends a vector,
// so any mix of vector lengths can be configured: with d components per
// vector the array holds floor(ROWS*COLS/d) vectors. The switch after the
// last element always ends a vector.
//
// During a search the global counting clock cnt_en enters every vector head
// and runs along the vector to its first non-matching element. The match of a
// vector appears at its tail switch and is handed to the KNN unit there. The
// OR tree any_new tells whether any vector matches that has not been voted
// yet; it stops the counting (through the bit activator). During a vote the
// scan token vote_en enters unit 0 and stops at the first unit with a new
// match, which puts its class label on the class bus; scan_end is high when
// the token leaves the last unit, i.e. no unvoted match is left.
//
// The original design gives the element content, the switch semantics and the
// distributed KNN units. Host access through one word-write port with
// row/column decoding, the row-major chain order and the OR-combined class
// bus are this design's choices.
//
// Timing: host writes take effect at the next edge. dcu_start starts all
// DCUs together; dcu_done pulses N cycles later and the DECs hold the new sum
// one cycle after it. All chain and OR-tree outputs are combinational.
module knn_rasm #(
  parameter int unsigned ROWS = 32,
  parameter int unsigned COLS = 8,
  parameter int unsigned N    = knn_pkg::N,
  parameter int unsigned E    = knn_pkg::E,
  parameter int unsigned L    = knn_pkg::L,
  parameter int unsigned NE   = ROWS * COLS,
  parameter int unsigned AW   = $clog2(NE)
) (
  input  logic          clk,
  input  logic          rst_n,
  // host writes
  input  logic          wr_ref,
  input  logic          wr_in,
  input  logic          wr_cs,
  input  logic          wr_cls,
  input  logic [AW-1:0] addr,
  input  logic [N-1:0]  wdata,
  // distance computation
  input  logic          dcu_start,
  input  logic          dec_clr,
  output logic          dcu_done,
  // search
  input  logic          srch_clr,   // clear DEU counters and voted flags
  input  logic          cnt_clr,    // clear DEU counters only
  input  logic [E-1:0]  bas,
  input  logic          cnt_en,
  output logic          any_new,
  output logic          all_voted,
  // vote
  input  logic          vote_en,
  output logic          act_any,
  output logic [L-1:0]  cls_bus,
  output logic          scan_end,
  // observation
  output logic [NE-1:0] tail_match,
  output logic [NE-1:0] voted,
  output logic [NE-1:0] cs
);

  logic [ROWS-1:0] row_sel;
  logic [COLS-1:0] col_sel;
  logic            wr_any;

  assign wr_any = wr_ref | wr_in | wr_cs | wr_cls;

  knn_addr_dec #(.ROWS(ROWS), .COLS(COLS), .AW(AW)) u_dec (
    .en(wr_any), .addr, .row_sel, .col_sel
  );

  // chain signals: index i is the input of element i / unit i
  logic          m_in   [NE];
  logic          c_in   [NE];
  logic          m_out  [NE];
  logic          c_out  [NE];
  logic          nx     [NE+1];
  logic [NE-1:0] new_m;
  logic [NE-1:0] act;
  logic [L-1:0]  cls_o  [NE];
  logic [NE-1:0] done_v;

  assign m_in[0] = 1'b1;
  assign c_in[0] = cnt_en;
  assign nx[0]   = vote_en;

  for (genvar i = 0; i < NE; i++) begin : g_el
    logic sel;
    logic m_r, c_r;
    assign sel = row_sel[i / COLS] & col_sel[i % COLS];

    knn_element #(.N(N), .E(E)) u_el (
      .clk, .rst_n,
      .wr_ref(wr_ref & sel), .wr_in(wr_in & sel), .wdata,
      .dcu_start, .dec_clr, .dcu_done(done_v[i]),
      .deu_clr(srch_clr | cnt_clr), .bas, .cnt_in(c_in[i]), .match_in(m_in[i]),
      .cnt_out(c_out[i]), .match_out(m_out[i]), .pdist()
    );

    knn_ps #(.FIXED_TAIL(i == NE - 1)) u_ps (
      .clk, .rst_n, .cs_wr(wr_cs & sel), .cs_din(wdata[0]),
      .match_l(m_out[i]), .cnt_l(c_out[i]), .cnt_head(cnt_en),
      .match_r(m_r), .cnt_r(c_r), .match_knn(tail_match[i]), .cs(cs[i])
    );

    if (i < NE - 1) begin : g_link
      assign m_in[i+1] = m_r;
      assign c_in[i+1] = c_r;
    end

    knn_unit #(.L(L)) u_knn (
      .clk, .rst_n, .clr(srch_clr), .match(tail_match[i]),
      .next_in(nx[i]), .next_out(nx[i+1]), .act(act[i]),
      .new_match(new_m[i]), .voted(voted[i]),
      .cls_wr(wr_cls & sel), .cls_din(wdata[L-1:0]), .cls_out(cls_o[i])
    );
  end

  assign dcu_done  = done_v[0];
  assign any_new   = |new_m;
  assign all_voted = &(voted | cs);
  assign act_any   = |act;
  assign scan_end  = nx[NE];

  always_comb begin
    cls_bus = '0;
    for (int i = 0; i < NE; i++) cls_bus = cls_bus | cls_o[i];
  end

endmodule
