// knn_mvc: global part of the majority-vote circuit.
//
// Each cycle in which a local KNN unit is selected (vote), its class label
// cls arrives on the class bus. The demultiplexer routes the vote to the
// counter of that class, and the vote counter C1 counts all votes. END rises
// when C1 equals k, i.e. after k votes. The comparator over the class
// counters gives class_out, the class with most votes; on equal counts the
// lower class number wins (this tie rule is this design's choice). The
// structure (C1, k comparator, DeMUX, one P-bit counter per class, final
// comparator) follows the original design.
//
// Interface: clr (sync) empties all counters before a vote. vote must not be
// raised when end_o is high. end_o and class_out are combinational in the
// registered counts.
module knn_mvc #(
  parameter int unsigned L  = knn_pkg::L,
  parameter int unsigned PW = knn_pkg::PW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic [PW-1:0] k,
  input  logic          vote,
  input  logic [L-1:0]  cls,
  output logic          end_o,
  output logic [L-1:0]  class_out,
  output logic [PW-1:0] c1,
  output logic [PW-1:0] votes [1<<L]
);

  localparam int unsigned NC = 1 << L;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c1 <= '0;
      for (int c = 0; c < NC; c++) votes[c] <= '0;
    end else if (clr) begin
      c1 <= '0;
      for (int c = 0; c < NC; c++) votes[c] <= '0;
    end else if (vote) begin
      c1 <= c1 + 1'b1;
      votes[cls] <= votes[cls] + 1'b1;
    end
  end

  assign end_o = (c1 == k);

  always_comb begin
    logic [PW-1:0] best;
    best      = votes[0];
    class_out = '0;
    for (int c = 1; c < NC; c++)
      if (votes[c] > best) begin
        best      = votes[c];
        class_out = L'(c);
      end
  end

endmodule
