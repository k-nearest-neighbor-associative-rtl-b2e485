// tb_knn_deu: three distance evaluation units chained as one vector. For
// random partial distances the bench plays the bit activator: from bit TOP
// down to bit 0 it applies the counting clock until the vector matches. At
// each bit the number of counting cycles must equal the sum of that bit over
// the three distances (the weighted count), each counter must then equal
// its distance truncated to the bits evaluated, and the vector must not
// match one cycle earlier. Also checks the pass-on of the counting clock.
module tb_knn_deu;
  localparam int unsigned E = 24, TOP = 17, NU = 3;
  logic clk = 0, rst_n = 0, clr = 0;
  logic [E-1:0] bas;
  logic [E-1:0] d [NU];
  logic [E-1:0] cnt [NU];
  logic ci [NU+1];
  logic mi [NU+1];
  int checks = 0, failures = 0;

  for (genvar u = 0; u < NU; u++) begin : g
    knn_deu #(.E(E)) dut (.clk, .rst_n, .clr, .bas, .pdist(d[u]), .cnt_in(ci[u]), .match_in(mi[u]),
      .cnt_out(ci[u+1]), .match_out(mi[u+1]), .cnt(cnt[u]));
  end

  logic run;
  assign ci[0] = run;
  assign mi[0] = 1'b1;

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [E-1:0] trunc(input logic [E-1:0] v, input int b);
    return (v >> b) << b;
  endfunction

  initial begin
    run = 0; bas = '0;
    for (int u = 0; u < NU; u++) d[u] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      for (int u = 0; u < NU; u++)
        d[u] = (t == 0) ? E'((1 << (TOP + 1)) - 1) : (t == 1) ? '0 : E'($urandom % (1 << (TOP + 1)));
      @(negedge clk) clr = 1;
      @(negedge clk) clr = 0;
      for (int b = TOP; b >= 0; b--) begin
        int exp_cyc, cyc;
        exp_cyc = 0;
        for (int u = 0; u < NU; u++) exp_cyc += int'(d[u][b]);
        bas = E'(1) << b;
        cyc = 0;
        run = 1;
        #1;
        while (!mi[NU] && cyc < 100) begin
          // counting clock must sit on exactly one element
          checks++;
          if (ci[NU] !== 1'b0) begin failures++; $display("FAIL clock passed a non-matching vector"); end
          @(negedge clk); cyc++;
        end
        run = 0;
        @(negedge clk);
        checks += 1 + NU;
        if (cyc != exp_cyc) begin failures++; $display("FAIL t=%0d b=%0d cycles %0d exp %0d", t, b, cyc, exp_cyc); end
        for (int u = 0; u < NU; u++)
          if (cnt[u] != trunc(d[u], b)) begin failures++; $display("FAIL cnt[%0d]=%0h exp %0h", u, cnt[u], trunc(d[u], b)); end
      end
      // fully matched: the clock runs through the whole vector
      run = 1; #1;
      checks++;
      if (ci[NU] !== 1'b1 || mi[NU] !== 1'b1) failures++;
      run = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
