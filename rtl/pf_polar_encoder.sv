// pf_polar_encoder: polar encoder of the decoder test platform, x = u G_N.
//
// What it does: forces the frozen positions of the source bits to zero and encodes the frame,
// x = u * F^(kron n) with F = [1 0; 1 1], the transform the decoder inverts.
// How it works: the usual log2(N)-level XOR butterfly. At level s, position i with bit s
// clear is XORed with position i + 2^s. This is the same network as the decoder's Kronecker
// module, but the mask is applied to the input instead of the output.
// Interface and timing: `u` (bit i = u_i) is sampled while `valid_in` is high. `x` (bit i = code
// bit x_i) and the registered `u_out` (the masked u, for the error statistics) appear with
// `valid_out` one cycle later.
// Source: the document gives the encoding rule (Sec. 2.1) and places the encoder in the test
// platform. Registering the output is this design's choice.
module pf_polar_encoder
  import fssc_pkg::*;
#(
  parameter int            N         = 1024,
  parameter logic [N-1:0]  INFO_MASK = N'(INFO_MASK_1024_512)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid_in,
  input  logic [N-1:0] u,
  output logic         valid_out,
  output logic [N-1:0] u_out,
  output logic [N-1:0] x
);

  localparam int L = $clog2(N);

  logic [N-1:0] x_c;

  // level s reads the output of level s-1 (the masked input for s = 0)
  for (genvar s = 0; s < L; s++) begin : g_lvl
    logic [N-1:0] a, o;
    if (s == 0) begin : g_first
      assign a = u & INFO_MASK;
    end else begin : g_next
      assign a = g_lvl[s-1].o;
    end
    always_comb begin
      for (int i = 0; i < N; i++)
        o[i] = (((i >> s) & 1) == 0) ? a[i] ^ a[i + (1 << s)] : a[i];
    end
  end
  assign x_c = g_lvl[L-1].o;

  always_ff @(posedge clk) begin
    if (valid_in) begin
      x     <= x_c;
      u_out <= u & INFO_MASK;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_out <= 1'b0;
    else        valid_out <= valid_in;
  end

endmodule
