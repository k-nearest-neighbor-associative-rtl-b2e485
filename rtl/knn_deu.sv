// knn_deu: distance evaluation unit (DEU) of one element, the
// weighted-value counter (WVC) plus its match detection circuit (MDC).
//
// The clock-mapping search turns the partial distance held in the DEC into
// a number of clock cycles. Each bit of the DEU has a one-bit frequency
// divider; a multiplexer per bit picks whether that divider is fed by the
// incoming counting clock or by the divider below it. The one-hot
// bit-activator signal bas selects the entry bit b, so every counting clock
// adds 2^b to the counter. Bits below b are zero at that time because the
// search only ever moves b downwards.
//
// Match detection compares counter and DEC output bit by bit and ANDs the
// results from the MSB down; bas picks the AND at bit b, so only the bits
// from the MSB down to b take part. The element matches (match_out) when the
// preceding elements of its vector matched (match_in) and its own bits do.
// The counting clock reaching the element (cnt_in) is passed on to the next
// element when the element matches and counts here otherwise, so along a
// vector the clock always lands on the first element that does not match.
//
// The counting clock is a synchronous enable here, not a gated clock; the
// divider chain is a toggle chain clocked by clk. This is this design's
// rendering of the original circuit; the cycle behaviour is the original's.
//
// Timing: match_out and cnt_out are combinational in the counter, pdist,
// bas and the chain inputs; the counter updates at the rising edge when
// cnt_in is high and the element does not match. clr zeroes the counter.
module knn_deu #(
  parameter int unsigned E = knn_pkg::E
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic [E-1:0] bas,        // one-hot: lowest bit taking part
  input  logic [E-1:0] pdist,       // DEC output
  input  logic         cnt_in,     // counting clock reaching this element
  input  logic         match_in,   // all preceding elements of the vector match
  output logic         cnt_out,    // counting clock passed to the next element
  output logic         match_out,  // this element and all before it match
  output logic [E-1:0] cnt         // counter value (observation)
);

  logic [E-1:0] eq;        // per-bit equality of counter and DEC
  logic [E:0]   cum;       // cum[i]: bits E-1 .. i all equal
  logic         local_match;
  logic         cnt_here;  // counting clock used by this element
  logic [E-1:0] tgl;

  always_comb begin
    eq     = ~(cnt ^ pdist);
    cum[E] = 1'b1;
    for (int i = E - 1; i >= 0; i--)
      cum[i] = cum[i+1] & eq[i];
    local_match = 1'b0;
    for (int i = 0; i < E; i++)
      local_match = local_match | (bas[i] & cum[i]);
  end

  assign match_out = match_in & local_match;
  assign cnt_out   = cnt_in & local_match;
  assign cnt_here  = cnt_in & ~local_match;

  // Divider chain: bit i is fed by the counting clock when bas selects it,
  // by the divider below it otherwise (carry when that bit is 1).
  always_comb begin
    logic c;  // clock out of the divider below bit i
    c = 1'b0;
    for (int i = 0; i < E; i++) begin
      tgl[i] = bas[i] ? cnt_here : c;
      c      = tgl[i] & cnt[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   cnt <= '0;
    else if (clr) cnt <= '0;
    else          cnt <= cnt ^ tgl;
  end

endmodule
