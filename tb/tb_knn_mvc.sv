// tb_knn_mvc: majority vote. Random label sequences of k votes; checks C1,
// END exactly after k votes, every class counter and the winning class
// (most votes, lowest class number on a tie) against a bench-side count.
module tb_knn_mvc;
  logic clk = 0, rst_n = 0, clr = 0, vote = 0;
  logic [3:0] k, c1;
  logic [2:0] cls, class_out;
  logic end_o;
  logic [3:0] votes [8];
  int checks = 0, failures = 0;

  knn_mvc #(.L(3), .PW(4)) dut (.clk, .rst_n, .clr, .k, .vote, .cls, .end_o, .class_out, .c1, .votes);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    k = 0; cls = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int cnt [8];
      int kk, best, bc;
      kk = 1 + int'($urandom % 15);
      k = 4'(kk);
      for (int c = 0; c < 8; c++) cnt[c] = 0;
      @(negedge clk) clr = 1;
      @(negedge clk) clr = 0;
      for (int v = 0; v < kk; v++) begin
        checks++;
        if (end_o) begin failures++; $display("FAIL early END"); end
        cls = (t % 4 == 0) ? 3'(v % 2 + 5) : 3'($urandom % 8);
        cnt[cls]++;
        vote = 1;
        @(negedge clk) vote = 0;
      end
      best = -1; bc = 0;
      for (int c = 0; c < 8; c++) if (cnt[c] > best) begin best = cnt[c]; bc = c; end
      checks += 3;
      if (!end_o) begin failures++; $display("FAIL END missing k=%0d", kk); end
      if (int'(c1) != kk) failures++;
      if (int'(class_out) != bc) begin failures++; $display("FAIL class %0d exp %0d", class_out, bc); end
      for (int c = 0; c < 8; c++) begin
        checks++;
        if (int'(votes[c]) != cnt[c]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
