// tb_knn_dcu: checks the distance computing unit against (a-b)^2 for the
// corner cases and random operand pairs, and checks that done comes exactly
// N cycles after start.
module tb_knn_dcu;
  localparam int unsigned N = 8;
  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] a, b;
  logic [2*N-1:0] sad;
  logic done;
  int checks = 0, failures = 0;

  knn_dcu #(.N(N)) dut (.clk, .rst_n, .start, .ref_w(a), .in_w(b), .sad, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [N-1:0] x, input logic [N-1:0] y);
    int cyc, d, exp;
    a = x; b = y;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 0;
    while (!done && cyc < 40) begin @(negedge clk); cyc++; end
    d   = int'(x) - int'(y);
    exp = d * d;
    checks += 2;
    if (int'(sad) != exp) begin failures++; $display("FAIL sad %0d %0d -> %0d exp %0d", x, y, sad, exp); end
    if (cyc != N) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    a = 0; b = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0, 0); run(255, 0); run(0, 255); run(128, 0); run(127, 255); run(1, 2);
    for (int i = 0; i < 300; i++) run(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
