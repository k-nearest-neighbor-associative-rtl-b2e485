// tb_knn_dec: accumulates random 16-bit values into the dimension-extension
// accumulator and compares with a running sum; checks clear and that clear
// wins over add.
module tb_knn_dec;
  localparam int unsigned E = 24;
  logic clk = 0, rst_n = 0, clr = 0, acc = 0;
  logic [15:0] sad;
  logic [E-1:0] pdist;
  longint sum;
  int checks = 0, failures = 0;

  knn_dec #(.E(E), .SAD_W(16)) dut (.clk, .rst_n, .clr, .acc, .sad, .pdist);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sad = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      @(negedge clk) clr = 1;
      @(negedge clk) clr = 0; sum = 0;
      checks++; if (pdist != 0) failures++;
      for (int i = 0; i < 256; i++) begin
        sad = (r == 0) ? 16'hFFFF : 16'($urandom);
        acc = ($urandom % 4) != 0;
        if (acc) sum += sad;
        @(negedge clk) acc = 0;
        checks++;
        if (longint'(pdist) != sum % (1 << E)) begin failures++; $display("FAIL %0d %0d", pdist, sum); end
      end
    end
    sad = 5; acc = 1; clr = 1;
    @(negedge clk) begin acc = 0; clr = 0; end
    checks++; if (pdist != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
