// fssc_decoder: fully unrolled, deeply pipelined Fast-SSC polar decoder.
//
// Decodes one frame of an (N,K) polar code per clock. The Fast-SSC decoding tree of the code
// is unrolled into a pipeline in which every operation of the tree traversal (F, G, C and
// the Rate-1/REP/SPC constituent decoders) is a stage of its own, so N LLRs enter and N
// decoded bits leave every cycle, NSTAGE cycles apart. The structure is generated from the
// information mask INFO_MASK by fssc_node; the default is a (1024,512) code.
//
// Stages: stage 0 registers the channel LLRs; stages 1 .. NSTAGE-2 are the tree operations;
// stage NSTAGE-1 is the output register, fed by the u bits of every constituent node (the
// last one converted by its Kronecker module in that same stage). The global_controller
// delays en_cha_alpha along the stages, giving each stage its enable.
//
// Interface: llr[i] is the 5-bit sign-magnitude channel LLR of code bit i (1 fractional
// bit), sampled in the cycle in which en_cha_alpha is high. NSTAGE cycles later u_valid is
// high for one cycle and u_hat[i] is the estimate of u_i (frozen positions read 0). Frames
// may be presented back to back or with gaps.
module fssc_decoder
  import fssc_pkg::*;
#(
  parameter int              N         = 1024,
  parameter logic [MAXN-1:0] INFO_MASK = INFO_MASK_1024_512,
  parameter int              W         = QCF,
  parameter int              LAT       = subtree_latency(N, INFO_MASK, 1'b0),
  parameter int              NSTAGE    = LAT + 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en_cha_alpha,
  input  logic [N-1:0][W-1:0] llr,
  output logic [N-1:0]       u_hat,
  output logic               u_valid
);

  logic [NSTAGE-1:0]    en;
  logic [N-1:0][W-1:0]  alpha_c;
  logic [N-1:0]         beta_root, u_tree;

  initial assert (N <= MAXN && N == (1 << $clog2(N))) else $error("N must be a power of two <= MAXN");

  global_controller #(.NSTAGE(NSTAGE)) u_ctrl (
    .clk, .rst_n, .channel_en(en_cha_alpha), .en);

  // stage 0: channel LLR register
  always_ff @(posedge clk) begin
    if (en[0]) alpha_c <= llr;
  end

  fssc_node #(.NV(N), .MASK(INFO_MASK), .NEED_BETA(1'b0), .IN_TC(1'b0), .WIN(W),
              .S0(1), .NST(NSTAGE), .OUTST(NSTAGE - 1)) u_root (
    .clk, .rst_n, .en, .alpha(alpha_c), .beta(beta_root), .u(u_tree));

  // last stage: output register
  always_ff @(posedge clk) begin
    if (en[NSTAGE-1]) u_hat <= u_tree;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) u_valid <= 1'b0;
    else        u_valid <= en[NSTAGE-1];
  end

endmodule
