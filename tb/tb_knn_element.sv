// tb_knn_element: one element on its own. Writes reference and input
// words, runs three distance computations and checks the accumulated
// distance and the DCU latency, then runs a bit-serial search on the single
// element (the bench plays the bit activator) and checks the number of
// counting clocks per bit and that the element matches at the end.
module tb_knn_element;
  localparam int unsigned E = 24, TOP = 18;
  logic clk = 0, rst_n = 0;
  logic wr_ref = 0, wr_in = 0, dcu_start = 0, dec_clr = 0, deu_clr = 0;
  logic [7:0] wdata = 0;
  logic dcu_done;
  logic [E-1:0] bas = '0;
  logic cnt_in = 0, cnt_out, match_out;
  logic [E-1:0] pdist;
  int checks = 0, failures = 0;

  knn_element #(.N(8), .E(E)) dut (.clk, .rst_n, .wr_ref, .wr_in, .wdata, .dcu_start, .dec_clr, .dcu_done,
    .deu_clr, .bas, .cnt_in, .match_in(1'b1), .cnt_out, .match_out, .pdist);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      longint sum;
      @(negedge clk) dec_clr = 1;
      @(negedge clk) dec_clr = 0;
      sum = 0;
      for (int l = 0; l < 3; l++) begin
        int r, x, cyc;
        r = int'($urandom % 256); x = int'($urandom % 256);
        if (t == 0) begin r = 255; x = 0; end
        wdata = 8'(r); wr_ref = 1;
        @(negedge clk) begin wr_ref = 0; wdata = 8'(x); wr_in = 1; end
        @(negedge clk) begin wr_in = 0; dcu_start = 1; end
        @(negedge clk) dcu_start = 0;
        cyc = 0;
        while (!dcu_done && cyc < 20) begin @(negedge clk); cyc++; end
        @(negedge clk);
        sum += longint'((r - x) * (r - x));
        checks += 2;
        if (cyc != 8) begin failures++; $display("FAIL latency %0d", cyc); end
        if (longint'(pdist) != sum) begin failures++; $display("FAIL pdist %0d exp %0d", pdist, sum); end
      end
      @(negedge clk) deu_clr = 1;
      @(negedge clk) deu_clr = 0;
      for (int b = TOP; b >= 0; b--) begin
        int cyc;
        bas = E'(1) << b;
        cnt_in = 1; cyc = 0;
        #1;
        while (!match_out && cyc < 10) begin
          checks++;
          if (cnt_out) failures++;
          @(negedge clk); cyc++;
        end
        checks++;
        if (cyc != int'(sum[b])) begin failures++; $display("FAIL bit %0d cycles %0d", b, cyc); end
        cnt_in = 0;
        @(negedge clk);
      end
      cnt_in = 1; #1;
      checks++;
      if (!cnt_out || !match_out) failures++;
      cnt_in = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
