// spc4_unit: decoder of a length-4 single-parity-check (SPC) node, one pipeline stage.
//
// The hard decisions are the input sign bits. Their XOR is the parity; when it is 1, the
// bit with the smallest magnitude is flipped. The smallest magnitude is found as in the
// document's 4MIN1 block: min01_flag = 0 when |a0| < |a1| (else 1), min23_flag likewise for
// a2/a3, sel = 0 when the smaller of a0/a1 is below the smaller of a2/a3 (else 1), and the
// judge logic raises one of D0..D3 from sel and the pair flag. Ties therefore pick the later
// index.
//
// With RO = 1 the unit is the document's RO_SPC: an SPC node whose left sibling is Rate-0,
// merged with the G_OR in front of it. It then takes the 8 LLRs of the parent, forms
// a[i] + a[i+4] (saturated to WOUT bits) and decodes those; beta is the 8-bit codeword of
// the parent, the SPC codeword written twice.
//
// Timing: the register loads at the end of a cycle with en = 1. Latency one clock.
module spc4_unit #(
  parameter int W    = 5,                // input LLR width (sign-magnitude)
  parameter bit RO   = 1'b0,
  parameter int WOUT = 6,                // width of the G_OR sums when RO = 1
  parameter int NIN  = RO ? 8 : 4,
  parameter int NOUT = RO ? 8 : 4
) (
  input  logic                  clk,
  input  logic                  en,
  input  logic [NIN-1:0][W-1:0] alpha,
  output logic [NOUT-1:0]       beta
);

  localparam int MW = (RO ? WOUT : W) - 1;   // magnitude width seen by the SPC core
  localparam int SW = (W > WOUT ? W : WOUT) + 1;
  localparam logic signed [SW-1:0] SAT = SW'((1 << (WOUT - 1)) - 1);

  logic [3:0]          sgn;
  logic [3:0][MW-1:0]  mag;

  // sign-magnitude operands of the SPC core (after the G_OR for RO_SPC)
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      if (RO) begin
        logic signed [SW-1:0] x, y, s;
        x = alpha[i][W-1]   ? -SW'(alpha[i][W-2:0])   : SW'(alpha[i][W-2:0]);
        y = alpha[i+4][W-1] ? -SW'(alpha[i+4][W-2:0]) : SW'(alpha[i+4][W-2:0]);
        s = x + y;
        if (s > SAT)  s = SAT;
        if (s < -SAT) s = -SAT;
        sgn[i] = s < 0;
        mag[i] = (s < 0) ? MW'(-s) : MW'(s);
      end else begin
        sgn[i] = alpha[i][W-1];
        mag[i] = MW'(alpha[i][W-2:0]);
      end
    end
  end

  // 4MIN1
  logic          min01_flag, min23_flag, sel;
  logic [MW-1:0] min01, min23;
  logic [3:0]    d;
  assign min01_flag = !(mag[0] < mag[1]);
  assign min23_flag = !(mag[2] < mag[3]);
  assign min01      = min01_flag ? mag[1] : mag[0];
  assign min23      = min23_flag ? mag[3] : mag[2];
  assign sel        = !(min01 < min23);
  // judge
  assign d[0] = !sel && !min01_flag;
  assign d[1] = !sel &&  min01_flag;
  assign d[2] =  sel && !min23_flag;
  assign d[3] =  sel &&  min23_flag;

  logic       parity;
  logic [3:0] cw;
  assign parity = ^sgn;
  always_comb begin
    for (int i = 0; i < 4; i++) cw[i] = d[i] ? sgn[i] ^ parity : sgn[i];
  end

  always_ff @(posedge clk) begin
    if (en) beta <= NOUT'({cw, cw});
  end

  if (RO) begin : g_chk
    initial assert (NIN == 8 && NOUT == 8) else $error("RO_SPC needs 8 inputs and outputs");
  end else begin : g_chk
    initial assert (NIN == 4 && NOUT == 4) else $error("SPC needs 4 inputs and outputs");
  end

endmodule
