// tb_knn_top: end-to-end test of the KNN classifier on a 4 x 4 array.
//
// For a series of configurations it writes switch settings, class labels,
// reference and input words through the host port, computes the distances
// (one or two partial loads), runs a search with some k and compares class,
// nearest set, voting set and search clock count with knn_tb_pkg::model.
// Configurations: vector lengths 1, 2, 3, 4, 5, 8, 16 and mixed, equal
// distances, k above the number of vectors, two-part vectors through the
// distance accumulators with the search started at a higher bit.
// It counts the mechanisms seen (bit-activator steps, search restarted after a
// vote, end by k votes, end by all vectors voted, tie at the nearest
// distance, accumulation of two loads, switch reconfiguration) and fails if
// one never happened.
module tb_knn_top;
  import knn_pkg::*;
  import knn_tb_pkg::*;

  localparam int unsigned ROWS = 4, COLS = 4, NE = ROWS * COLS, AW = 4;

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
  int n_ba_step = 0, n_resume = 0, n_end_k = 0, n_end_all = 0, n_tie = 0, n_twoload = 0, n_reconf = 0;

  knn_top #(.ROWS(ROWS), .COLS(COLS)) dut (.clk, .rst_n, .cmd_valid, .cmd_op, .cmd_addr, .cmd_data,
    .busy, .done, .class_out, .nn_match, .knn_sel, .search_clocks);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism monitors
  logic [4:0] lvl_q;
  logic [2:0] st_q;
  always @(posedge clk) begin
    lvl_q <= dut.u_ba.level;
    st_q  <= dut.u_ctrl.state;
    if (dut.u_ba.run && dut.u_ba.any_match && dut.u_ba.level != 0) n_ba_step++;
    if (st_q == 3 && dut.u_ctrl.state == 2) n_resume++;
  end

  task automatic cmd(input cmd_op_t op, input int a, input int d);
    @(negedge clk);
    while (busy) @(negedge clk);
    cmd_valid = 1; cmd_op = op; cmd_addr = AW'(a); cmd_data = 8'(d);
    @(negedge clk);
    cmd_valid = 0; cmd_op = OP_NOP;
  endtask

  longint D [];
  bit     cs [];
  int     lab [];

  task automatic run_case(input int vlen [], input int k, input int loads, input int mode);
    result_t r;
    int e, top, cyc;
    bit prev_cs [];
    prev_cs = cs;
    // switch configuration from the list of vector lengths
    e = 0;
    foreach (vlen[v]) for (int j = 0; j < vlen[v] && e < NE; j++) begin
      cs[e] = (j != vlen[v] - 1); e++;
    end
    while (e < NE) begin cs[e] = 0; e++; end
    cs[NE-1] = 0;
    if (cs != prev_cs) n_reconf++;
    for (int i = 0; i < NE; i++) begin
      cmd(OP_WR_CS, i, int'(cs[i]));
      lab[i] = int'($urandom % 8);
      cmd(OP_WR_CLS, i, lab[i]);
    end
    cmd(OP_CLR_DEC, 0, 0);
    for (int i = 0; i < NE; i++) D[i] = 0;
    for (int l = 0; l < loads; l++) begin
      for (int i = 0; i < NE; i++) begin
        int rv, iv;
        iv = int'($urandom % 256);
        rv = (mode == 1) ? iv + 3 * (i % 2) : int'($urandom % 256);   // mode 1: many equal distances
        if (mode == 2) rv = (iv > 127) ? iv - 128 : iv + 128;        // mode 2: large distances
        if (rv > 255) rv = 255;
        cmd(OP_WR_REF, i, rv);
        cmd(OP_WR_IN, i, iv);
        D[i] += longint'((rv - iv) * (rv - iv));
      end
      cmd(OP_COMPUTE, 0, 0);
    end
    if (loads > 1) n_twoload++;
    top = (loads > 1) ? 23 : 15;
    cmd(OP_SET_TOP, 0, top);
    r = model(D, cs, lab, k, top);
    cmd(OP_SEARCH, 0, k);
    cyc = 0;
    while (!done && cyc < 200000) begin @(negedge clk); cyc++; end
    if (dut.u_mvc.end_o) n_end_k++; else n_end_all++;
    begin
      int nn_cnt;
      nn_cnt = 0;
      checks += 4;
      for (int i = 0; i < NE; i++) begin
        if (nn_match[i] != r.nn[i])  begin failures++; $display("FAIL nn[%0d]", i); end
        if (knn_sel[i]  != r.sel[i]) begin failures++; $display("FAIL sel[%0d]", i); end
        nn_cnt += int'(r.nn[i]);
      end
      if (nn_cnt > 1) n_tie++;
      if (int'(class_out) != r.cls) begin failures++; $display("FAIL class %0d exp %0d", class_out, r.cls); end
      if (int'(search_clocks) != r.clocks) begin failures++; $display("FAIL clocks %0d exp %0d", search_clocks, r.clocks); end
      // worst case of the clock-mapping search: (top + 1) x (d + 1) - 1
      begin
        int dmax;
        dmax = 0;
        foreach (vlen[v]) if (vlen[v] > dmax) dmax = vlen[v];
        checks++;
        if (int'(search_clocks) > (top + 1) * (dmax + 1) - 1) begin failures++; $display("FAIL bound"); end
      end
    end
  endtask

  initial begin
    D = new[NE]; cs = new[NE]; lab = new[NE];
    foreach (cs[i]) cs[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_case('{4, 4, 4, 4}, 1, 1, 0);
    run_case('{4, 4, 4, 4}, 3, 1, 0);
    run_case('{2, 2, 2, 2, 2, 2, 2, 2}, 5, 1, 0);
    run_case('{3, 3, 3, 3, 3, 1}, 4, 1, 0);
    run_case('{1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1}, 7, 1, 1);
    run_case('{8, 8}, 1, 1, 0);
    run_case('{16}, 1, 1, 2);
    run_case('{5, 2, 6, 3}, 15, 1, 0);
    run_case('{4, 4, 4, 4}, 2, 2, 0);
    run_case('{2, 2, 2, 2, 2, 2, 2, 2}, 3, 1, 1);
    for (int t = 0; t < 6; t++) run_case('{4, 4, 4, 4}, 1 + t, 1, t % 2);
    $display("mechanisms: ba_step=%0d resume=%0d end_k=%0d end_all=%0d tie=%0d twoload=%0d reconf=%0d",
             n_ba_step, n_resume, n_end_k, n_end_all, n_tie, n_twoload, n_reconf);
    checks += 7;
    if (n_ba_step == 0) failures++;
    if (n_resume == 0)  failures++;
    if (n_end_k == 0)   failures++;
    if (n_end_all == 0) failures++;
    if (n_tie == 0)     failures++;
    if (n_twoload == 0) failures++;
    if (n_reconf == 0)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
