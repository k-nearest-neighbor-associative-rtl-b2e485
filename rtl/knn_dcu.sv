// knn_dcu: distance computing unit of one element.
//
// Computes the squared absolute difference SAD = (ref_w - in_w)^2 of one
// N-bit vector component. On start, |ref_w - in_w| is formed once by a
// subtractor and latched; then one partial product (the latched difference
// shifted by i, kept when bit i of the difference is 1) is added per clock.
// In the original design the square is formed by shift operation and
// partial-product addition in at most 8 clocks for 8-bit words;
// the exact sequencing (one partial product per clock, LSB first) is this
// design's choice.
//
// Timing: start is sampled at a rising edge; done pulses for one cycle N
// cycles later, with sad valid from then on until the next start.
module knn_dcu #(
  parameter int unsigned N = knn_pkg::N
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N-1:0]   ref_w,
  input  logic [N-1:0]   in_w,
  output logic [2*N-1:0] sad,
  output logic           done
);

  localparam int unsigned CW = $clog2(N + 1);

  logic [N-1:0]   diff;      // |ref - in|
  logic [CW-1:0]  step;      // partial products still to add
  logic [2*N-1:0] acc;
  logic           busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      diff <= '0;
      step <= '0;
      acc  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        diff <= (ref_w >= in_w) ? ref_w - in_w : in_w - ref_w;
        acc  <= '0;
        step <= CW'(N);
        busy <= 1'b1;
      end else if (busy) begin
        // partial product for bit (N - step) of the difference
        if (diff[N - int'(step)])
          acc <= acc + ((2*N)'(diff) << (N - int'(step)));
        step <= step - 1'b1;
        if (step == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign sad = acc;

endmodule
