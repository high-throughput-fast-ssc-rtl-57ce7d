// fssc_node: the pipelined decoder of one node of the pruned Fast-SSC decoding tree.
//
// The module instantiates itself for the two children of a split node, so one instance at
// the root unrolls the whole decoder. What a node becomes is decided at elaboration time from
// the information mask of its NV positions (bit i = 1 when u_i is an information bit):
//
//   Rate-0   no hardware; codeword and u bits are zero.
//   Rate-1   codeword = sign bits of alpha (no stage of its own).
//   REP      rep_unit, rep_stages(NV) stages.
//   SPC      spc4_unit (length 4 only), one stage.
//   split    F stage, left child, G stage, right child, C stage (Fig. 2 local decoder):
//            alpha is kept in a stage_fifo until the G stage, the left codeword in another
//            until the C stage. The C stage is left out when no ancestor needs this node's
//            codeword (the right spine of the tree).
//   split with a Rate-0 left child: G_OR stage and the right child only (the left child
//            is skipped, its codeword is zero, C reduces to writing the right codeword twice).
//            RO_RI falls out of this (the Rate-1 child costs no stage); RO_SPC is one merged
//            spc4_unit stage.
// A G whose input has at least G_TC_MIN LLRs leaves its result in two's complement and the
// right child is told so (IN_TC), which turns its F into F_with_front_complement and its G
// into G_without_front_complement.
//
// Every leaf converts its codeword into its u bits with a kron_unit and holds them in a
// stage_fifo until stage OUTST, where the decoder's output register reads them.
//
// Timing: the node's alpha input is valid while en[S0] is high (it was written by stage
// S0-1); its codeword beta is valid while en[S0+LAT] is high; u is valid while en[OUTST] is
// high. LAT = subtree_latency(NV, MASK, NEED_BETA). The defaults describe the (16,8) code of
// the document's Fig. 1 decoded on its own.
//
// Lint note: when this module is linted as the top of its own hierarchy, Verilator does not
// elaborate the module's instances of itself and reports the child outputs (beta_l, beta_r,
// u_l, u_r) as undriven. Below fssc_decoder, or any other parent, the recursion elaborates
// fully and those warnings do not appear.
module fssc_node
  import fssc_pkg::*;
#(
  parameter int              NV        = 16,              // default: the (16,8) code of Fig. 1
  parameter logic [MAXN-1:0] MASK      = MAXN'(16'hFE80),
  parameter bit              NEED_BETA = 1'b1,
  parameter bit              IN_TC     = 1'b0,
  parameter int              WIN       = QCF,
  parameter int              S0        = 0,
  parameter int              NST       = S0 + subtree_latency(NV, MASK, NEED_BETA) + 1,
  parameter int              OUTST     = NST - 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NST-1:0]        en,
  input  logic [NV-1:0][WIN-1:0] alpha,
  output logic [NV-1:0]         beta,
  output logic [NV-1:0]         u
);

  localparam node_t TYPE = node_type(NV, MASK);
  localparam int    LAT  = subtree_latency(NV, MASK, NEED_BETA);
  localparam int    NH   = (NV > 1) ? NV / 2 : 1;
  localparam logic [NV-1:0] NMASK = MASK[NV-1:0];

  initial assert (S0 + LAT <= OUTST && OUTST < NST) else $error("fssc_node: stage window out of range");

  if (TYPE == NODE_RATE0) begin : g_rate0
    assign beta = '0;
    assign u    = '0;

  end else if (TYPE == NODE_RATE1 || TYPE == NODE_REP || TYPE == NODE_SPC) begin : g_leaf
    localparam int LS = (TYPE == NODE_REP) ? rep_stages(NV) : (TYPE == NODE_SPC) ? 1 : 0;
    logic [NV-1:0] cw, uc;
    if (TYPE == NODE_RATE1) begin : g_r1
      // Eq. (1): the sign bit is the hard decision, in either number format
      for (genvar i = 0; i < NV; i++) begin : g_hd
        assign cw[i] = alpha[i][WIN-1];
      end
    end else if (TYPE == NODE_REP) begin : g_rep
      logic b;
      rep_unit #(.NV(NV), .W(WIN), .IN_TC(IN_TC)) u_rep (
        .clk, .en(en[S0 +: LS]), .alpha, .beta(b));
      assign cw = {NV{b}};
    end else begin : g_spc
      initial assert (!IN_TC) else $error("SPC input must be sign-magnitude");
      spc4_unit #(.W(WIN)) u_spc (.clk, .en(en[S0]), .alpha(alpha[3:0]), .beta(cw[3:0]));
    end
    assign beta = cw;
    kron_unit #(.NV(NV), .MASK(NMASK)) u_kron (.beta(cw), .u(uc));
    stage_fifo #(.W(NV), .D(OUTST - S0 - LS)) u_umem (
      .clk, .rst_n, .wr_en(en[S0 + LS]), .rd_en(en[OUTST]), .din(uc), .dout(u));

  end else begin : g_split
    localparam logic [MAXN-1:0] LMASK = MASK;
    localparam logic [MAXN-1:0] RMASK = MASK >> NH;
    localparam node_t LTYPE = node_type(NH, LMASK);
    localparam node_t RTYPE = node_type(NH, RMASK);
    localparam int    GW    = g_width(WIN);
    localparam bit    G_TC  = (NV >= G_TC_MIN);

    if (LTYPE == NODE_RATE0 && RTYPE == NODE_SPC) begin : g_ro_spc
      logic [7:0] cw, uc;
      logic [3:0] ur;
      initial assert (!IN_TC && NV == 8) else $error("RO_SPC shape");
      spc4_unit #(.W(WIN), .RO(1'b1), .WOUT(GW)) u_spc (
        .clk, .en(en[S0]), .alpha(alpha[7:0]), .beta(cw));
      assign beta = NV'(cw);
      kron_unit #(.NV(4), .MASK(RMASK[3:0])) u_kron (.beta(cw[7:4]), .u(ur));
      assign uc = {ur, 4'b0};
      stage_fifo #(.W(8), .D(OUTST - S0 - 1)) u_umem (
        .clk, .rst_n, .wr_en(en[S0 + 1]), .rd_en(en[OUTST]), .din(uc), .dout(u[7:0]));

    end else if (LTYPE == NODE_RATE0) begin : g_g_or
      logic [NH-1:0][GW-1:0] alpha_r;
      logic [NH-1:0]         beta_r, u_r;
      g_unit #(.NH(NH), .WIN(WIN), .WOUT(GW), .IN_TC(IN_TC), .OUT_TC(G_TC), .ZERO_BETA(1'b1)) u_g (
        .clk, .en(en[S0]), .alpha, .beta_l('0), .alpha_r);
      fssc_node #(.NV(NH), .MASK(RMASK), .NEED_BETA(NEED_BETA), .IN_TC(G_TC), .WIN(GW),
                  .S0(S0 + 1), .NST(NST), .OUTST(OUTST)) u_right (
        .clk, .rst_n, .en, .alpha(alpha_r), .beta(beta_r), .u(u_r));
      assign beta = {beta_r, beta_r};
      assign u    = {u_r, NH'(0)};

    end else begin : g_full
      localparam int LL = subtree_latency(NH, LMASK, 1'b1);
      localparam int LR = subtree_latency(NH, RMASK, NEED_BETA);
      localparam int SG = S0 + 1 + LL;        // G stage
      localparam int SC = SG + 1 + LR;        // C stage
      logic [NH-1:0][WIN-1:0] alpha_l;
      logic [NV-1:0][WIN-1:0] alpha_v;
      logic [NH-1:0][GW-1:0]  alpha_r;
      logic [NH-1:0]          beta_l, beta_r, u_l, u_r;

      f_unit #(.NH(NH), .W(WIN), .IN_TC(IN_TC)) u_f (.clk, .en(en[S0]), .alpha, .alpha_l);
      fssc_node #(.NV(NH), .MASK(LMASK), .NEED_BETA(1'b1), .IN_TC(1'b0), .WIN(WIN),
                  .S0(S0 + 1), .NST(NST), .OUTST(OUTST)) u_left (
        .clk, .rst_n, .en, .alpha(alpha_l), .beta(beta_l), .u(u_l));
      // alpha_memory: the node's input, reused by G after the left subtree
      stage_fifo #(.W(NV * WIN), .D(SG - S0)) u_amem (
        .clk, .rst_n, .wr_en(en[S0]), .rd_en(en[SG]), .din(alpha), .dout(alpha_v));
      g_unit #(.NH(NH), .WIN(WIN), .WOUT(GW), .IN_TC(IN_TC), .OUT_TC(G_TC), .ZERO_BETA(1'b0)) u_g (
        .clk, .en(en[SG]), .alpha(alpha_v), .beta_l, .alpha_r);
      fssc_node #(.NV(NH), .MASK(RMASK), .NEED_BETA(NEED_BETA), .IN_TC(G_TC), .WIN(GW),
                  .S0(SG + 1), .NST(NST), .OUTST(OUTST)) u_right (
        .clk, .rst_n, .en, .alpha(alpha_r), .beta(beta_r), .u(u_r));
      assign u = {u_r, u_l};

      if (NEED_BETA) begin : g_c
        logic [NH-1:0] beta_ld;
        // beta_memory: the left codeword, reused by C after the right subtree
        stage_fifo #(.W(NH), .D(SC - SG)) u_bmem (
          .clk, .rst_n, .wr_en(en[SG]), .rd_en(en[SC]), .din(beta_l), .dout(beta_ld));
        c_unit #(.NH(NH)) u_c (.clk, .en(en[SC]), .beta_l(beta_ld), .beta_r, .beta_v(beta));
      end else begin : g_noc
        assign beta = '0;   // not used by any ancestor
      end
    end
  end

endmodule
