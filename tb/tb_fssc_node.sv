// tb_fssc_node: unit test of the recursive node decoder on short codes.
//
// Instantiates fssc_node as the root of a (64,32) code with NEED_BETA = 1, so the codeword
// output and the C stage of the root are exercised too, and drives its stage enables from
// a shift register. Random noisy LLR frames are streamed in with gaps; the u bits and the
// codeword are compared with the software model, and the codeword must appear exactly
// LAT stages after the input and the u bits at OUTST.
module tb_fssc_node;
  import fssc_pkg::*;
  import fssc_ref_pkg::*;

  localparam int NV = 64;
  localparam logic [MAXN-1:0] MASK = MAXN'(64'hfffefec0fc808000);
  localparam int LAT = subtree_latency(NV, MASK, 1'b1);
  localparam int S0 = 1;
  localparam int OUTST = S0 + LAT + 2;     // u aligned a little after the codeword
  localparam int NST = OUTST + 1;
  localparam int FRAMES = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NST-1:0] en = '0;
  logic go = 1'b0;
  logic [NV-1:0][QCF-1:0] alpha = '0, alpha_in = '0;
  logic [NV-1:0] beta, u;

  fssc_node #(.NV(NV), .MASK(MASK), .NEED_BETA(1'b1), .IN_TC(1'b0), .WIN(QCF),
              .S0(S0), .NST(NST), .OUTST(OUTST)) dut (
    .clk, .rst_n, .en, .alpha, .beta, .u);

  always #5 clk = ~clk;

  // stage 0 register and enable chain
  always_ff @(posedge clk) begin
    en <= {en[NST-2:0], 1'b0};
    en[1] <= go;
    if (go) alpha <= alpha_in;
  end

  int unsigned checks = 0, failures = 0;
  logic [RN-1:0] exp_u [$], exp_cw [$];
  logic [RN-1:0] mask_r;

  initial begin
    #(10 * 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned got_u = 0, got_b = 0;
  logic [RN-1:0] cw_q [$];
  always @(posedge clk) begin
    if (rst_n && en[S0 + LAT]) begin
      logic [RN-1:0] e;
      e = exp_cw.pop_front();
      checks++;
      if (beta !== e[NV-1:0]) begin failures++; $display("codeword %0d: %h expected %h", got_b, beta, e[NV-1:0]); end
      got_b++;
    end
    if (rst_n && en[OUTST]) begin
      logic [RN-1:0] e;
      e = exp_u.pop_front();
      checks++;
      if (u !== e[NV-1:0]) begin failures++; $display("u %0d: %h expected %h", got_u, u, e[NV-1:0]); end
      got_u++;
    end
  end

  initial begin
    logic [RN-1:0] uu, x, cw;
    int llr_i [RN];
    logic [NV-1:0][QCF-1:0] frame_v;
    mask_r = '0;
    mask_r[NV-1:0] = MASK[NV-1:0];
    checks++;
    if (ref_pw_mask(NV, 32) != mask_r) begin failures++; $display("mask mismatch"); end
    checks++;
    if (LAT != ref_stages_r(NV, 0, mask_r, 1'b1)) begin failures++; $display("LAT %0d model %0d", LAT, ref_stages_r(NV, 0, mask_r, 1'b1)); end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < FRAMES; f++) begin
      uu = '0;
      for (int i = 0; i < NV; i++) if (mask_r[i]) uu[i] = $urandom % 2;
      x = ref_polar_transform(NV, 0, uu);
      for (int i = 0; i < NV; i++) begin
        int n;
        n = (f % 5 == 0) ? 0 : int'($urandom % 25) - 12;
        llr_i[i] = (x[i] ? -6 : 6) + n;
        if (f % 7 == 3) llr_i[i] = int'($urandom % 31) - 15;    // pure noise
        if (llr_i[i] > 15) llr_i[i] = 15;
        if (llr_i[i] < -15) llr_i[i] = -15;
        frame_v[i] = {llr_i[i] < 0, 4'(llr_i[i] < 0 ? -llr_i[i] : llr_i[i])};
      end
      alpha_in <= frame_v;
      exp_u.push_back(ref_decode(NV, mask_r, llr_i, cw));
      exp_cw.push_back(cw);
      go <= 1'b1;
      @(posedge clk);
      if ($urandom % 4 == 0) begin
        go <= 1'b0;
        repeat (1 + $urandom % 3) @(posedge clk);
      end
    end
    go <= 1'b0;
    repeat (NST + 4) @(posedge clk);
    checks++;
    if (got_u != FRAMES || got_b != FRAMES) begin failures++; $display("frames out %0d %0d", got_u, got_b); end
    $display("spc_flips=%0d g_sat=%0d rep_ones=%0d g_or=%0d", stats.spc_flips, stats.g_sat, stats.rep_ones, stats.g_or);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
