// tb_knn_workload_2048: 2048-component vectors through the distance
// accumulators. Four vectors of 8 elements (4 x 8 array) are loaded in 256
// parts, so each element accumulates 256 squared differences. Vector 0 gets
// the largest difference in every part (255^2 x 256 = 16,646,400 per
// element, just under the 2^24 range of the 24-bit accumulator); the others
// get random words. The search starts at bit 23 with k = 3. The bench checks
// the accumulated distances, the nearest vector, the voting vectors, the
// class and the search clock count against knn_tb_pkg::model, and the bound
// 24 x (8 + 1) - 1 = 215 clocks.
module tb_knn_workload_2048;
  import knn_pkg::*;
  import knn_tb_pkg::*;

  localparam int unsigned ROWS = 4, COLS = 8, NE = ROWS * COLS, AW = 5, PARTS = 256;

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0;
  cmd_op_t cmd_op = OP_NOP;
  logic [AW-1:0] cmd_addr = '0;
  logic [7:0] cmd_data = '0;
  logic busy, done;
  logic [2:0] class_out;
  logic [NE-1:0] nn_match, knn_sel;
  logic [15:0] search_clocks;
  int checks = 0, failures = 0;

  knn_top #(.ROWS(ROWS), .COLS(COLS)) dut (.clk, .rst_n, .cmd_valid, .cmd_op, .cmd_addr, .cmd_data,
    .busy, .done, .class_out, .nn_match, .knn_sel, .search_clocks);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmd(input cmd_op_t op, input int a, input int d);
    @(negedge clk);
    while (busy) @(negedge clk);
    cmd_valid = 1; cmd_op = op; cmd_addr = AW'(a); cmd_data = 8'(d);
    @(negedge clk);
    cmd_valid = 0; cmd_op = OP_NOP;
  endtask

  longint dd [];
  bit     cs [];
  int     lab [];

  initial begin
    result_t r;
    int cyc;
    dd = new[NE]; cs = new[NE]; lab = new[NE];
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NE; i++) begin
      cs[i]  = (i % COLS != COLS - 1);
      lab[i] = int'($urandom % 8);
      dd[i]  = 0;
      cmd(OP_WR_CS, i, int'(cs[i]));
      cmd(OP_WR_CLS, i, lab[i]);
    end
    cmd(OP_CLR_DEC, 0, 0);
    for (int p = 0; p < PARTS; p++) begin
      for (int i = 0; i < NE; i++) begin
        int rv, iv;
        if (i < COLS) begin rv = 255; iv = 0; end
        else begin rv = int'($urandom % 256); iv = int'($urandom % 256); end
        cmd(OP_WR_REF, i, rv);
        cmd(OP_WR_IN, i, iv);
        dd[i] += longint'((rv - iv) * (rv - iv));
      end
      cmd(OP_COMPUTE, 0, 0);
    end
    @(negedge clk);
    while (busy) @(negedge clk);
    checks += 2;
    if (longint'(dut.u_rasm.g_el[0].u_el.pdist) != dd[0] || dd[0] != 64'd16646400) begin
      failures++; $display("FAIL accumulated distance of element 0");
    end
    if (longint'(dut.u_rasm.g_el[13].u_el.pdist) != dd[13]) begin
      failures++; $display("FAIL accumulated distance of element 13");
    end
    cmd(OP_SET_TOP, 0, 23);
    r = model(dd, cs, lab, 3, 23);
    cmd(OP_SEARCH, 0, 3);
    cyc = 0;
    while (!done && cyc < 150000) begin @(negedge clk); cyc++; end
    $display("search clocks to nearest: %0d (model %0d), cycles to class: %0d", search_clocks, r.clocks, cyc);
    checks += 5;
    if (!done) failures++;
    for (int i = 0; i < NE; i++) begin
      if (nn_match[i] != r.nn[i]) begin failures++; $display("FAIL nn[%0d]", i); end
      if (knn_sel[i] != r.sel[i]) begin failures++; $display("FAIL sel[%0d]", i); end
    end
    if (knn_sel[COLS-1]) begin failures++; $display("FAIL farthest vector voted"); end
    if (int'(class_out) != r.cls) begin failures++; $display("FAIL class"); end
    if (int'(search_clocks) != r.clocks) begin failures++; $display("FAIL clocks"); end
    if (int'(search_clocks) > 24 * (COLS + 1) - 1) begin failures++; $display("FAIL bound"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
