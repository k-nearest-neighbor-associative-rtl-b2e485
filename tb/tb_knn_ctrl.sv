// tb_knn_ctrl: control unit against a bench model of the array, bit
// activator and vote counter. Checks the write strobes of each command, the
// busy time of a distance computation, the k and start-bit registers, and
// the search / vote sequence: vote after an LSB match, restart the search (counter clear and
// bit-activator reload) when the scan ends before k votes, stop at k votes or when all vectors voted,
// one-cycle done, and capture of the clock count at the first LSB match.
module tb_knn_ctrl;
  import knn_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0;
  cmd_op_t cmd_op = OP_NOP;
  logic [7:0] cmd_addr = '0, cmd_data = '0;
  logic busy, done, wr_ref, wr_in, wr_cs, wr_cls, dcu_start, dec_clr, srch_clr, cnt_clr, vote_en;
  logic [7:0] addr, wdata;
  logic dcu_done = 0, scan_end, all_voted = 0, lsb_hit, end_o;
  logic ba_load, run, mvc_clr, nn_capture;
  logic [4:0] top_bit;
  logic [15:0] clocks = 0, first_clocks;
  logic [3:0] k;
  int checks = 0, failures = 0;

  knn_ctrl #(.AW(8), .CLK_W(16)) dut (.clk, .rst_n, .cmd_valid, .cmd_op, .cmd_addr, .cmd_data, .busy, .done,
    .wr_ref, .wr_in, .wr_cs, .wr_cls, .addr, .wdata, .dcu_start, .dec_clr, .dcu_done, .srch_clr, .cnt_clr,
    .scan_end, .all_voted, .vote_en, .ba_load, .top_bit, .run, .lsb_hit, .clocks,
    .mvc_clr, .k, .end_o, .nn_capture, .first_clocks);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // environment: DCU answers 8 cycles after start; the search finds `hit_after`
  // clocks later a match with `pending` new vectors; c1 counts votes.
  int dcu_cnt = -1, srch_cnt = 0, hit_after = 3, pending = 0, per_round = 2, c1 = 0, total = 0, voted_total = 0;
  assign lsb_hit  = run && srch_cnt >= hit_after;
  assign end_o    = c1 == int'(k);
  assign scan_end = vote_en && pending == 0;
  always @(posedge clk) begin
    dcu_done <= (dcu_cnt == 1);
    if (dcu_start) dcu_cnt <= 8; else if (dcu_cnt > 0) dcu_cnt <= dcu_cnt - 1;
    if (srch_clr) begin c1 <= 0; voted_total <= 0; clocks <= 0; end
    if (run) begin
      srch_cnt <= lsb_hit ? 0 : srch_cnt + 1;
      clocks <= clocks + 1;
      if (lsb_hit) pending <= (per_round < total - voted_total) ? per_round : total - voted_total;
    end
    if (vote_en && pending > 0) begin
      pending <= pending - 1; c1 <= c1 + 1; voted_total <= voted_total + 1;
    end
  end
  always_comb all_voted = voted_total == total;

  task automatic cmd(input cmd_op_t op, input int d);
    @(negedge clk);
    while (busy) @(negedge clk);
    cmd_valid = 1; cmd_op = op; cmd_addr = 8'(d + 1); cmd_data = 8'(d);
    #1;
    checks += 2;
    if ({wr_ref, wr_in, wr_cs, wr_cls, dec_clr, dcu_start, srch_clr} !=
        {op == OP_WR_REF, op == OP_WR_IN, op == OP_WR_CS, op == OP_WR_CLS, op == OP_CLR_DEC, op == OP_COMPUTE, op == OP_SEARCH})
      begin failures++; $display("FAIL strobes op=%0d", op); end
    if (addr != 8'(d + 1) || wdata != 8'(d)) failures++;
    @(negedge clk);
    cmd_valid = 0; cmd_op = OP_NOP;
  endtask

  task automatic search(input int kk, input int ntot, input int pr, input int ha);
    int cyc, rounds, dones, exp_votes, cap, restarts;
    total = ntot; per_round = pr; hit_after = ha;
    cmd(OP_SEARCH, kk);
    cyc = 0; rounds = 0; dones = 0; cap = -1; restarts = 0;
    while (!done && cyc < 1000) begin
      if (nn_capture) cap = int'(clocks);
      if (run && lsb_hit) rounds++;
      if (cnt_clr) begin restarts++; if (!ba_load) failures++; end
      @(negedge clk); cyc++;
    end
    exp_votes = (kk < ntot) ? kk : ntot;
    checks += 5;
    if (!done) failures++;
    if (c1 != exp_votes) begin failures++; $display("FAIL votes %0d exp %0d", c1, exp_votes); end
    if (rounds != ((exp_votes == 0) ? 1 : (exp_votes + pr - 1) / pr))
      begin failures++; $display("FAIL rounds %0d", rounds); end
    checks++;
    if (restarts != rounds - 1) begin failures++; $display("FAIL restarts %0d rounds %0d", restarts, rounds); end
    if (int'(first_clocks) != ha || cap != ha) begin failures++; $display("FAIL first clocks %0d", first_clocks); end
    @(negedge clk);
    if (done || busy) failures++;
  endtask

  initial begin
    int cyc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks += 2;
    if (k != 1 || top_bit != 15) failures++;
    if (busy) failures++;
    cmd(OP_WR_REF, 3); cmd(OP_WR_IN, 4); cmd(OP_WR_CS, 1); cmd(OP_WR_CLS, 5); cmd(OP_CLR_DEC, 0);
    cmd(OP_SET_TOP, 23);
    checks++;
    if (top_bit != 23) failures++;
    cmd(OP_COMPUTE, 0);
    cyc = 0;
    while (busy && cyc < 50) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 9) begin failures++; $display("FAIL compute busy %0d", cyc); end
    search(1, 10, 1, 5);
    checks++;
    if (k != 1) failures++;
    search(5, 10, 2, 7);    // three rounds, the last one ends by k
    search(6, 10, 2, 2);    // three rounds, ends by k after full scans
    search(9, 4, 3, 4);     // fewer vectors than k: ends when all voted
    search(0, 4, 1, 1);     // k = 0: no vote
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
