// c_unit: the C operation, combining the codewords of two sibling nodes into their parent's.
//
// beta_v[i] = beta_l[i] XOR beta_r[i] for i < NH and beta_v[i+NH] = beta_r[i], as in the
// document's C module. Bit i of a vector belongs to position i of the node.
//
// Timing: the result register loads at the end of a cycle with en = 1. Latency one clock.
module c_unit #(
  parameter int NH = 2
) (
  input  logic            clk,
  input  logic            en,
  input  logic [NH-1:0]   beta_l,
  input  logic [NH-1:0]   beta_r,
  output logic [2*NH-1:0] beta_v
);

  always_ff @(posedge clk) begin
    if (en) beta_v <= {beta_r, beta_l ^ beta_r};
  end

endmodule
