// g_unit: the G operation of the decoding tree (variable-node update), one pipeline stage.
//
// For every i < NH: alpha_r[i] = a[i+NH] + a[i] when beta_l[i] = 0, a[i+NH] - a[i] otherwise.
// As in the document's G module, the sign of a[i] is flipped by beta_l, both operands are
// complemented from sign-magnitude into two's complement, added, and the sum converted back.
// The sum saturates at +/-(2^(WOUT-1)-1), which keeps it representable in sign-magnitude.
// Variants of the document's Table 2 are parameters:
//   ZERO_BETA = 1        G_OR, the left sibling is Rate-0 and beta_l is known to be zero
//   IN_TC = 1            G_without_front_complement (inputs already two's complement)
//   OUT_TC = 1           G_without_latter_complement (result left in two's complement
//                        for the next stage to convert, Fig. 8 of the G_256 optimisation)
//   both                 G_without_complement
//
// Timing: the result register loads at the end of a cycle with en = 1. Latency one clock.
module g_unit #(
  parameter int NH        = 2,
  parameter int WIN       = 5,
  parameter int WOUT      = 6,
  parameter bit IN_TC     = 1'b0,
  parameter bit OUT_TC    = 1'b0,
  parameter bit ZERO_BETA = 1'b0
) (
  input  logic                      clk,
  input  logic                      en,
  input  logic [2*NH-1:0][WIN-1:0]  alpha,
  input  logic [NH-1:0]             beta_l,
  output logic [NH-1:0][WOUT-1:0]   alpha_r
);

  localparam int SW = (WIN > WOUT ? WIN : WOUT) + 1;
  localparam logic signed [SW-1:0] SAT = SW'((1 << (WOUT - 1)) - 1);

  logic [NH-1:0][WOUT-1:0] g_comb;

  // sign-magnitude or two's complement word -> SW-bit two's complement
  function automatic logic signed [SW-1:0] to_tc(logic [WIN-1:0] v, logic flip);
    logic signed [SW-1:0] r;
    if (IN_TC) r = SW'(signed'(v));
    else       r = v[WIN-1] ? -SW'(v[WIN-2:0]) : SW'(v[WIN-2:0]);
    return flip ? -r : r;
  endfunction

  always_comb begin
    for (int i = 0; i < NH; i++) begin
      logic signed [SW-1:0] s;
      logic [WOUT-2:0]      mag;
      s = to_tc(alpha[i+NH], 1'b0) + to_tc(alpha[i], ZERO_BETA ? 1'b0 : beta_l[i]);
      if (s > SAT)  s = SAT;
      if (s < -SAT) s = -SAT;
      mag = (s < 0) ? (WOUT-1)'(-s) : (WOUT-1)'(s);
      if (OUT_TC) g_comb[i] = WOUT'(s);
      else        g_comb[i] = {s < 0, mag};
    end
  end

  always_ff @(posedge clk) begin
    if (en) alpha_r <= g_comb;
  end

endmodule
