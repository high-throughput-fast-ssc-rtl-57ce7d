// rep_unit: decoder of a repetition (REP) node, pipelined over several stages.
//
// A REP node of length NV carries one information bit, repeated over the whole node. Its
// estimate is 0 when the sum of the NV input LLRs is >= 0 and 1 otherwise. The sum is a
// binary adder tree of log2(NV) levels. Following the document, the tree is cut into
// STAGES = ceil(log2(NV)/2) pipeline stages: the first stage complements the sign-magnitude
// inputs into two's complement and, when the number of levels is odd, does one adder level;
// every further stage does two levels (8 inputs: 1 + 2 levels in two stages, as in the
// document's 8-input example; 16, 64, 128 inputs take 2, 3, 4 stages). Sums are kept at full
// precision, so nothing saturates. With IN_TC = 1 the inputs are already two's complement.
//
// Timing: en[s] enables the register at the end of stage s; the frame enters with en[0] and
// beta is valid from the register written by en[STAGES-1] (latency STAGES clocks).
module rep_unit
  import fssc_pkg::*;
#(
  parameter int NV     = 8,
  parameter int W      = 5,
  parameter bit IN_TC  = 1'b0,
  parameter int STAGES = rep_stages(NV)
) (
  input  logic                 clk,
  input  logic [STAGES-1:0]    en,
  input  logic [NV-1:0][W-1:0] alpha,
  output logic                 beta
);

  localparam int L  = $clog2(NV);
  localparam int SW = W + L;
  localparam int FIRST = (L % 2 == 1 || L < 2) ? 1 : 2;   // adder levels in stage 0

  // adder level l (1..L) ends a pipeline stage when it is the first stage's last level or
  // two levels after the previous stage boundary; level L always ends the last stage
  function automatic bit is_reg(int l);
    return l >= FIRST && (l - FIRST) % 2 == 0;
  endfunction
  function automatic int stage_of(int l);
    return (l - FIRST) / 2;
  endfunction

  // lv[l][j]: partial sum j of level l (level 0 = the inputs in two's complement);
  // lr[l]: the stage register behind level l, used where is_reg(l)
  logic [L:0][NV-1:0][SW-1:0] lv, lr;

  always_comb begin
    lv = '0;
    for (int i = 0; i < NV; i++) begin
      if (IN_TC) lv[0][i] = SW'(signed'(alpha[i]));
      else       lv[0][i] = alpha[i][W-1] ? -SW'(alpha[i][W-2:0]) : SW'(alpha[i][W-2:0]);
    end
    for (int l = 1; l <= L; l++) begin
      for (int j = 0; j < (NV >> l); j++) begin
        if (l > 1 && is_reg(l - 1)) lv[l][j] = lr[l-1][2*j] + lr[l-1][2*j+1];
        else                        lv[l][j] = lv[l-1][2*j] + lv[l-1][2*j+1];
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int l = 1; l <= L; l++) begin
      if (is_reg(l) && en[stage_of(l)]) lr[l] <= lv[l];
    end
  end

  // hard decision of Eq. (2): 1 when the sum is negative
  assign beta = lr[L][0][SW-1];

endmodule
