// tb_knn_unit: four local KNN units in a token chain. Checks that the token
// stops at the first unvoted match, that act reads out the stored label,
// that a voted unit passes the token from then on, and that clr re-arms it.
module tb_knn_unit;
  localparam int NU = 4;
  logic clk = 0, rst_n = 0, clr = 0;
  logic [NU-1:0] match, act, nm, voted, cls_wr;
  logic nx [NU+1];
  logic [2:0] din;
  logic [2:0] co [NU];
  logic [2:0] bus;
  int checks = 0, failures = 0;

  for (genvar u = 0; u < NU; u++) begin : g
    knn_unit #(.L(3)) dut (.clk, .rst_n, .clr, .match(match[u]), .next_in(nx[u]), .next_out(nx[u+1]),
      .act(act[u]), .new_match(nm[u]), .voted(voted[u]), .cls_wr(cls_wr[u]), .cls_din(din), .cls_out(co[u]));
  end
  assign bus = co[0] | co[1] | co[2] | co[3];

  logic tok;
  assign nx[0] = tok;

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tok = 0; match = '0; cls_wr = '0; din = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int u = 0; u < NU; u++) begin
      din = 3'(u + 3); cls_wr = NU'(1 << u);
      @(negedge clk);
    end
    cls_wr = '0;
    for (int rep = 0; rep < 20; rep++) begin
      logic [NU-1:0] m, left;
      m = NU'($urandom);
      if (rep == 0) m = '1;
      @(negedge clk) clr = 1;
      @(negedge clk) clr = 0;
      match = m; left = m;
      // token off: nothing happens
      #1 checks++;
      if (act != 0 || nm != m) failures++;
      tok = 1;
      for (int s = 0; s <= NU; s++) begin
        int first;
        first = -1;
        for (int u = NU - 1; u >= 0; u--) if (left[u]) first = u;
        #1 checks += 3;
        if (first < 0) begin
          if (act != 0 || nx[NU] !== 1'b1 || bus != 0) begin failures++; $display("FAIL end rep=%0d", rep); end
        end else begin
          if (act != NU'(1 << first)) begin failures++; $display("FAIL act %b exp unit %0d", act, first); end
          if (bus != 3'(first + 3)) begin failures++; $display("FAIL label %0d", bus); end
          if (nx[NU] !== 1'b0) failures++;
          left[first] = 1'b0;
        end
        @(negedge clk);
      end
      checks++;
      if (voted != m) begin failures++; $display("FAIL voted %b exp %b", voted, m); end
      tok = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
