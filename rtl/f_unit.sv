// f_unit: the F operation of the decoding tree (min-sum check-node update), one pipeline stage.
//
// For every i < NH it forms alpha_l[i] = sign(a[i]) * sign(a[i+NH]) * min(|a[i]|, |a[i+NH]|):
// the output sign is the XOR of the two input signs and the magnitude the smaller of the two
// magnitudes, as in the document's F module. LLRs are sign-magnitude words of W bits. With
// IN_TC = 1 the inputs arrive in two's complement from a G stage that skipped its output
// conversion, and are converted first (the document's F_with_front_complement). A zero result
// is always given a positive sign, so that a hard decision on the sign bit equals "alpha < 0";
// that is this design's choice.
//
// Timing: the result register loads at the clock edge that ends a cycle with en = 1 and holds
// otherwise. Latency one clock.
module f_unit #(
  parameter int NH    = 2,   // outputs; the input vector has 2*NH LLRs
  parameter int W     = 5,   // LLR width
  parameter bit IN_TC = 1'b0 // inputs in two's complement
) (
  input  logic                       clk,
  input  logic                       en,
  input  logic [2*NH-1:0][W-1:0]     alpha,
  output logic [NH-1:0][W-1:0]       alpha_l
);

  logic [NH-1:0][W-1:0] f_comb;

  always_comb begin
    for (int i = 0; i < NH; i++) begin
      logic [W-1:0] a, b;
      logic [W-2:0] ma, mb, mn;
      logic         sa, sb;
      a  = alpha[i];
      b  = alpha[i+NH];
      sa = a[W-1];
      sb = b[W-1];
      if (IN_TC) begin
        ma = sa ? (W-1)'(-a) : a[W-2:0];
        mb = sb ? (W-1)'(-b) : b[W-2:0];
      end else begin
        ma = a[W-2:0];
        mb = b[W-2:0];
      end
      mn = (ma < mb) ? ma : mb;
      f_comb[i] = {(mn != '0) & (sa ^ sb), mn};
    end
  end

  always_ff @(posedge clk) begin
    if (en) alpha_l <= f_comb;
  end

endmodule
