// tb_knn_ps: exhaustive check of the programmable switch: joined (CS=1) and
// split (CS=0) routing of match and counting clock, the KNN match output,
// and the fixed-tail variant.
module tb_knn_ps;
  logic clk = 0, rst_n = 0, cs_wr = 0, cs_din = 0;
  logic ml, cl, ch;
  logic mr, cr, mk, cs, mr2, cr2, mk2, cs2;
  int checks = 0, failures = 0;

  knn_ps #(.FIXED_TAIL(1'b0)) dut  (.clk, .rst_n, .cs_wr, .cs_din, .match_l(ml), .cnt_l(cl),
    .cnt_head(ch), .match_r(mr), .cnt_r(cr), .match_knn(mk), .cs(cs));
  knn_ps #(.FIXED_TAIL(1'b1)) dut2 (.clk, .rst_n, .cs_wr, .cs_din, .match_l(ml), .cnt_l(cl),
    .cnt_head(ch), .match_r(mr2), .cnt_r(cr2), .match_knn(mk2), .cs(cs2));

  always #5 clk = ~clk;
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c);
    for (int v = 0; v < 8; v++) begin
      {ml, cl, ch} = 3'(v);
      #1;
      checks += 5;
      if (cs != c) failures++;
      if (c) begin
        if (mr != ml || cr != cl || mk != 1'b0) begin failures++; $display("FAIL join v=%0d", v); end
      end else begin
        if (mr != 1'b1 || cr != ch || mk != ml) begin failures++; $display("FAIL split v=%0d", v); end
      end
      if (cs2 != 1'b0 || mr2 != 1'b1 || cr2 != ch || mk2 != ml) begin failures++; $display("FAIL tail v=%0d", v); end
    end
  endtask

  initial begin
    {ml, cl, ch} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(1'b0);
    @(negedge clk) begin cs_wr = 1; cs_din = 1; end
    @(negedge clk) cs_wr = 0;
    chk(1'b1);
    @(negedge clk) cs_din = 0;   // no write strobe: value must hold
    @(negedge clk);
    chk(1'b1);
    @(negedge clk) cs_wr = 1;
    @(negedge clk) cs_wr = 0;
    chk(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
