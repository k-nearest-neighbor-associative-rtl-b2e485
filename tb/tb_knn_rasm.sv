// tb_knn_rasm: the switch-configured array on 2 rows x 3 elements. For
// random switch settings, labels and words it computes the distances, then
// the bench acts as bit activator (counting while no new match, one bit down
// per match) and, at the LSB match, checks the matching tails against
// knn_tb_pkg::model. It then scans the vote token and checks that the
// nearest vectors come out one per cycle in array order with their labels,
// that scan_end follows, and all_voted once every vector has voted.
module tb_knn_rasm;
  import knn_tb_pkg::*;
  localparam int unsigned ROWS = 2, COLS = 3, NE = 6, E = 24, AW = 3;
  logic clk = 0, rst_n = 0;
  logic wr_ref = 0, wr_in = 0, wr_cs = 0, wr_cls = 0;
  logic [AW-1:0] addr = '0;
  logic [7:0] wdata = '0;
  logic dcu_start = 0, dec_clr = 0, dcu_done, srch_clr = 0, cnt_clr = 0;
  logic [E-1:0] bas = '0;
  logic cnt_en = 0, any_new, all_voted, vote_en = 0, act_any, scan_end;
  logic [2:0] cls_bus;
  logic [NE-1:0] tail_match, voted, cs_o;
  int checks = 0, failures = 0;

  knn_rasm #(.ROWS(ROWS), .COLS(COLS), .AW(AW)) dut (.clk, .rst_n, .wr_ref, .wr_in, .wr_cs, .wr_cls, .addr, .wdata,
    .dcu_start, .dec_clr, .dcu_done, .srch_clr, .cnt_clr, .bas, .cnt_en, .any_new, .all_voted,
    .vote_en, .act_any, .cls_bus, .scan_end, .tail_match, .voted, .cs(cs_o));

  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(ref logic strobe, input int a, input int d);
    @(negedge clk) begin strobe = 1; addr = AW'(a); wdata = 8'(d); end
    @(negedge clk) strobe = 0;
  endtask

  longint D [];
  bit cs [];
  int lab [];

  initial begin
    result_t r;
    D = new[NE]; cs = new[NE]; lab = new[NE];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      for (int i = 0; i < NE; i++) begin
        int rv, iv;
        cs[i] = (i == NE - 1) ? 1'b0 : 1'($urandom);
        lab[i] = int'($urandom % 8);
        iv = int'($urandom % 256);
        rv = (t % 3 == 0) ? iv + int'($urandom % 3) : iv + int'($urandom % 16);
        if (rv > 255) rv = 255;
        D[i] = longint'((rv - iv) * (rv - iv));
        wr(wr_cs, i, int'(cs[i]));
        wr(wr_cls, i, lab[i]);
        wr(wr_ref, i, rv);
        wr(wr_in, i, iv);
      end
      checks++;
      for (int i = 0; i < NE; i++) if (cs_o[i] != cs[i]) begin failures++; $display("FAIL cs t=%0d", t); break; end
      @(negedge clk) dec_clr = 1;
      @(negedge clk) begin dec_clr = 0; dcu_start = 1; end
      @(negedge clk) dcu_start = 0;
      while (!dcu_done) @(negedge clk);
      @(negedge clk) srch_clr = 1;
      @(negedge clk) srch_clr = 0;
      r = model(D, cs, lab, 0, 17);
      // search, bench as bit activator
      for (int b = 17; b >= 0; b--) begin
        bas = E'(1) << b;
        @(negedge clk);
        #1;
        while (!any_new) begin
          cnt_en = 1;
          @(negedge clk);
          cnt_en = 0;
          #1;
        end
      end
      checks++;
      for (int i = 0; i < NE; i++)
        if (tail_match[i] != r.nn[i]) begin failures++; $display("FAIL t=%0d tail %0d", t, i); end
      // vote scan
      @(negedge clk);
      vote_en = 1;
      for (int i = 0; i < NE; i++) if (r.nn[i]) begin
        #1 checks += 2;
        if (!act_any || scan_end) begin failures++; $display("FAIL act t=%0d", t); end
        if (int'(cls_bus) != lab[i]) begin failures++; $display("FAIL label unit %0d got %0d exp %0d t=%0d", i, cls_bus, lab[i], t); end
        @(negedge clk);
      end
      #1 checks++;
      if (!scan_end || act_any) begin failures++; $display("FAIL scan_end t=%0d", t); end
      vote_en = 0;
      checks++;
      for (int i = 0; i < NE; i++) if (voted[i] != r.nn[i]) begin failures++; $display("FAIL voted t=%0d", t); break; end
      // continue counting at the LSB until every vector is voted
      while (!all_voted) begin
        #1;
        if (any_new) begin
          vote_en = 1; @(negedge clk); vote_en = 0;
        end else begin
          cnt_en = 1; @(negedge clk); cnt_en = 0;
        end
      end
      checks++;
      for (int i = 0; i < NE; i++) if (voted[i] != (!cs[i])) begin failures++; $display("FAIL all t=%0d %b", t, voted); break; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
