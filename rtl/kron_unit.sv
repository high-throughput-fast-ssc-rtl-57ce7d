// kron_unit: Kronecker power module, u = beta * F^(kron n) for one constituent node.
//
// A constituent node decoder produces the codeword estimate beta of its NV positions; the
// information bits are recovered by multiplying it by G_NV = F^(kron log2 NV), the same
// matrix as the encoder since G is its own inverse. The multiplication is the usual XOR
// butterfly of log2(NV) levels: at level s, position i with bit s clear is XORed with
// position i + 2^s. Positions that are frozen in MASK are known to be zero and are forced
// to zero, so the XOR trees that feed them fall away in synthesis, as the document notes.
// Purely combinational; the pipeline register that follows belongs to the caller.
module kron_unit #(
  parameter int              NV   = 8,
  parameter logic [NV-1:0]   MASK = '1     // 1 = information position
) (
  input  logic [NV-1:0] beta,
  output logic [NV-1:0] u
);

  localparam int L = $clog2(NV);

  always_comb begin
    logic [NV-1:0] v;
    v = beta;
    for (int s = 0; s < L; s++) begin
      for (int i = 0; i < NV; i++) begin
        if (((i >> s) & 1) == 0) v[i] = v[i] ^ v[i + (1 << s)];
      end
    end
    u = v & MASK;
  end

endmodule
