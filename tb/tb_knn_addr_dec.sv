// tb_knn_addr_dec: every address of a 5 x 3 array selects exactly its row and
// column; out-of-range addresses and en = 0 select nothing.
module tb_knn_addr_dec;
  localparam int unsigned R = 5, C = 3;
  logic en;
  logic [3:0] addr;
  logic [R-1:0] row_sel;
  logic [C-1:0] col_sel;
  int checks = 0, failures = 0;

  knn_addr_dec #(.ROWS(R), .COLS(C), .AW(4)) dut (.en, .addr, .row_sel, .col_sel);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int a = 0; a < 16; a++) begin
        en = e[0]; addr = 4'(a);
        #1;
        checks++;
        if (e == 1 && a < R * C) begin
          if (row_sel != R'(1 << (a / C)) || col_sel != C'(1 << (a % C))) begin
            failures++; $display("FAIL a=%0d row=%b col=%b", a, row_sel, col_sel);
          end
        end else if (row_sel != 0 || col_sel != 0) begin
          failures++; $display("FAIL idle a=%0d e=%0d", a, e);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
