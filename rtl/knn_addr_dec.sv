// knn_addr_dec: row and column decoders of the element array.
//
// Splits an element address (row * COLS + col) into a one-hot row select and
// a one-hot column select; an element is written when both its row and its
// column are selected and en is high. Addresses outside the array select
// nothing. Purely combinational. The chip has a row decoder and a column
// decoder; their form here is this design's own.
module knn_addr_dec #(
  parameter int unsigned ROWS = 32,
  parameter int unsigned COLS = 8,
  parameter int unsigned AW   = $clog2(ROWS * COLS)
) (
  input  logic            en,
  input  logic [AW-1:0]   addr,
  output logic [ROWS-1:0] row_sel,
  output logic [COLS-1:0] col_sel
);

  always_comb begin
    row_sel = '0;
    col_sel = '0;
    if (en && 32'(addr) < ROWS * COLS) begin
      row_sel[32'(addr) / COLS] = 1'b1;
      col_sel[32'(addr) % COLS] = 1'b1;
    end
  end

endmodule
