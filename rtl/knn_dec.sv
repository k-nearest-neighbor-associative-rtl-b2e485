// knn_dec: dimension-extension circuit (DEC) of one element.
//
// An E-bit accumulator of squared component differences. When a feature
// vector has more components than the array holds, the host loads the
// vector in parts and the DEC sums the SAD of each part, so that the element
// presents the partial squared distance of all components it has seen.
// With E = 24 and 16-bit SADs, 256 parts fit without overflow (the original chip
// quotes 2048 dimensions for eight elements per row).
//
// Interface: clr empties the accumulator, acc adds sad; both are sampled at
// the rising edge and clr wins. pdist is the registered sum.
module knn_dec #(
  parameter int unsigned E     = knn_pkg::E,
  parameter int unsigned SAD_W = knn_pkg::SAD_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             acc,
  input  logic [SAD_W-1:0] sad,
  output logic [E-1:0]     pdist
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   pdist <= '0;
    else if (clr) pdist <= '0;
    else if (acc) pdist <= pdist + E'(sad);
  end

endmodule
