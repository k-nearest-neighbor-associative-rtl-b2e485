// tb_knn_ba: bit activator. A bench-side model applies match cycles at
// random; checks the one-hot BAS, the one-bit step down per match, that
// counting stops during a match cycle, the LSB hit, the clock count and the
// clamp of the start bit.
module tb_knn_ba;
  localparam int unsigned E = 24;
  logic clk = 0, rst_n = 0, load = 0, run = 0, any_match = 0;
  logic [4:0] top_bit, level;
  logic [E-1:0] bas;
  logic cnt_en, lsb_hit;
  logic [15:0] clocks;
  int checks = 0, failures = 0;

  knn_ba #(.E(E), .LVL_W(5), .CLK_W(16)) dut (.clk, .rst_n, .load, .top_bit, .run, .any_match,
    .bas, .cnt_en, .lsb_hit, .level, .clocks);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    top_bit = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int lvl, ncyc;
      lvl = (t == 0) ? 31 : (t == 1) ? 0 : int'($urandom % E);
      top_bit = 5'(lvl);
      if (lvl > E - 1) lvl = E - 1;
      @(negedge clk) load = 1;
      @(negedge clk) load = 0;
      run = 1; ncyc = 0;
      forever begin
        any_match = ($urandom % 3) == 0;
        #1;
        checks += 4;
        if (bas != E'(1) << lvl) begin failures++; $display("FAIL bas %h lvl %0d", bas, lvl); end
        if (cnt_en != !any_match) failures++;
        if (lsb_hit != (any_match && lvl == 0)) failures++;
        if (clocks != 16'(ncyc)) begin failures++; $display("FAIL clocks %0d exp %0d", clocks, ncyc); end
        if (lsb_hit) break;
        if (any_match) lvl--;
        ncyc++;
        @(negedge clk);
      end
      @(negedge clk);
      // hit holds the level
      checks++;
      if (level != 0) failures++;
      run = 0; any_match = 0;
      @(negedge clk);
      checks++;
      if (cnt_en != 0 || lsb_hit != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
