// tb_knn_top_full: the classifier at its full size (32 rows x 8 elements of
// 8-bit words, default parameters) configured as 32 eight-component vectors,
// one per row. Vector 0 is nearest with a single large component difference
// (128^2 in the first component, zero elsewhere); vector 1 is second with
// differences 127, 15, 5, 2, 1, 1, 0, 0 (distance 16385 against 16384); all
// vector 2 is third (128 and 4, distance 16400) and all
// other vectors are farther. This is the worst-case pattern for the match
// path. The bench checks the nearest vector, the three voting vectors, the
// majority class, the search clock count against knn_tb_pkg::model and the
// bound 2N x (d + 1) - 1 = 143 clocks.
module tb_knn_top_full;
  import knn_pkg::*;
  import knn_tb_pkg::*;

  localparam int unsigned NE = 256, D = 8;

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0;
  cmd_op_t cmd_op = OP_NOP;
  logic [7:0] cmd_addr = '0;
  logic [7:0] cmd_data = '0;
  logic busy, done;
  logic [2:0] class_out;
  logic [NE-1:0] nn_match, knn_sel;
  logic [15:0] search_clocks;
  int checks = 0, failures = 0;

  knn_top dut (.clk, .rst_n, .cmd_valid, .cmd_op, .cmd_addr, .cmd_data,
    .busy, .done, .class_out, .nn_match, .knn_sel, .search_clocks);

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmd(input cmd_op_t op, input int a, input int d);
    @(negedge clk);
    while (busy) @(negedge clk);
    cmd_valid = 1; cmd_op = op; cmd_addr = 8'(a); cmd_data = 8'(d);
    @(negedge clk);
    cmd_valid = 0; cmd_op = OP_NOP;
  endtask

  longint dd [];
  bit     cs [];
  int     lab [];
  int     inp [D];
  int     diff1 [D] = '{127, 15, 5, 2, 1, 1, 0, 0};

  initial begin
    result_t r;
    int cyc;
    dd = new[NE]; cs = new[NE]; lab = new[NE];
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < D; c++) inp[c] = int'($urandom % 100);
    for (int i = 0; i < NE; i++) begin
      int row, col, rv;
      row = i / D; col = i % D;
      cs[i]  = (col != D - 1);
      lab[i] = (row < 2) ? 2 : (row == 2) ? 6 : int'($urandom % 8);
      if (row == 0)      rv = inp[col] + ((col == 0) ? 128 : 0);
      else if (row == 1) rv = inp[col] + diff1[col];
      else if (row == 2) rv = inp[col] + ((col == 0) ? 128 : (col == 1) ? 4 : 0);
      else               rv = inp[col] + 50 + int'($urandom % 100);
      dd[i] = longint'((rv - inp[col]) * (rv - inp[col]));
      cmd(OP_WR_CS, i, int'(cs[i]));
      cmd(OP_WR_CLS, i, lab[i]);
      cmd(OP_WR_REF, i, rv);
      cmd(OP_WR_IN, i, inp[col]);
    end
    cmd(OP_CLR_DEC, 0, 0);
    cmd(OP_COMPUTE, 0, 0);
    r = model(dd, cs, lab, 3, 15);
    cmd(OP_SEARCH, 0, 3);
    cyc = 0;
    while (!done && cyc < 250000) begin @(negedge clk); cyc++; end
    $display("search clocks to nearest: %0d (model %0d), cycles to class: %0d, vectors %0d",
             search_clocks, r.clocks, cyc, r.nvec);
    checks += 6;
    if (!done) failures++;
    if (nn_match != NE'(1) << (D - 1)) begin failures++; $display("FAIL nn %h", nn_match); end
    for (int i = 0; i < NE; i++)
      if (knn_sel[i] != r.sel[i]) begin failures++; $display("FAIL sel[%0d]", i); break; end
    if (int'(class_out) != r.cls) begin failures++; $display("FAIL class %0d exp %0d", class_out, r.cls); end
    if (int'(search_clocks) != r.clocks) begin failures++; $display("FAIL clocks"); end
    if (int'(search_clocks) > 2 * N * (D + 1) - 1) begin failures++; $display("FAIL bound"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
