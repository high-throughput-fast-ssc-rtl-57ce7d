// tb_fssc_decoder: end-to-end test of the (1024,512) decoder at its default parameters.
//
// Random information bits are encoded (x = u G_N), BPSK-modulated, passed through an AWGN
// channel at several noise levels and quantised to 5-bit sign-magnitude LLRs with one
// fractional bit. Frames are streamed into the decoder back to back and with random gaps.
// Every output frame is compared with the software model in fssc_ref_pkg; noiseless frames
// must also return the transmitted bits. The decoder must need exactly the stage count the
// model predicts, and deliver one frame per clock when frames arrive back to back. The
// test counts how often each decoding mechanism was used and fails if one never was.
module tb_fssc_decoder;
  import fssc_pkg::*;
  import fssc_ref_pkg::*;

  localparam int N      = 1024;
  localparam int FRAMES = 48;

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic                en_cha_alpha = 1'b0;
  logic [N-1:0][QCF-1:0] llr = '0;
  logic [N-1:0]        u_hat;
  logic                u_valid;

  fssc_decoder dut (.clk, .rst_n, .en_cha_alpha, .llr, .u_hat, .u_valid);

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0, cycle = 0;
  int unsigned gaps = 0, back_to_back = 0, out_back_to_back = 0, bit_errors_ch = 0, noisy_frames = 0;
  int unsigned frame_errors = 0, sat_llr = 0;

  logic [RN-1:0] exp_u [$];
  logic [RN-1:0] sent_u [$];
  bit            exp_clean [$];
  int unsigned   in_cycle [$];
  logic [RN-1:0] mask;


  initial begin
    #(10 * 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom % 65536) / 65536.0;
    return s - 6.0;
  endfunction

  // output checker
  int unsigned got = 0;
  int unsigned last_out = 0;
  // one process counts edges, timestamps inputs and checks outputs, so they cannot race
  always @(posedge clk) begin
    cycle++;
    if (rst_n && en_cha_alpha) in_cycle.push_back(cycle);
    if (rst_n && u_valid) begin
      logic [RN-1:0] e, s;
      bit clean;
      int unsigned t0;
      e = exp_u.pop_front();
      s = sent_u.pop_front();
      clean = exp_clean.pop_front();
      t0 = in_cycle.pop_front();
      checks++;
      if (u_hat !== e[N-1:0]) begin
        failures++;
        $display("frame %0d: decoder output differs from model", got);
      end
      checks++;
      // latency: llr sampled at edge t0, u_valid seen at edge t0 + NSTAGE
      if (cycle - t0 != dut.NSTAGE || dut.NSTAGE != ref_stages_r(N, 0, mask, 1'b0) + 2) begin
        failures++;
        $display("frame %0d: latency %0d, NSTAGE %0d, model stages %0d", got, cycle - t0, dut.NSTAGE,
                 ref_stages_r(N, 0, mask, 1'b0) + 2);
      end
      if (clean) begin
        checks++;
        if (u_hat !== s[N-1:0]) begin failures++; $display("frame %0d: noiseless frame not decoded", got); end
      end
      if (u_hat !== s[N-1:0]) frame_errors++;
      checks++;
      if ((u_hat & ~mask[N-1:0]) != '0) begin failures++; $display("frame %0d: frozen bit set", got); end
      if (got > 0 && last_out == cycle - 1) out_back_to_back++;
      last_out = cycle;
      got++;
    end
  end

  initial begin
    logic [RN-1:0] u, x, cw, ue;
    int llr_i [RN];
    logic [N-1:0][QCF-1:0] frame_v;
    real sigma, y;
    mask = ref_pw_mask(N, 512);
    checks++;
    if (mask[N-1:0] != INFO_MASK_1024_512) begin
      failures++;
      $display("default information set differs from the polarization-weight construction");
    end
    stats = '{default: 0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int f = 0; f < FRAMES; f++) begin
      // noise level: noiseless, then Eb/N0 from about 4.5 dB down to 0 dB
      sigma = (f % 4 == 0) ? 0.0 : 0.45 + 0.25 * real'(f % 4 - 1);
      u = '0;
      for (int i = 0; i < N; i++) if (mask[i]) u[i] = $urandom % 2;
      x = ref_polar_transform(N, 0, u);
      for (int i = 0; i < N; i++) begin
        y = (x[i] ? -1.0 : 1.0) + sigma * gauss();
        // LLR = 2y/sigma^2, scaled for 1 fractional bit; noiseless frames use full scale
        if (sigma == 0.0) llr_i[i] = x[i] ? -15 : 15;
        else begin
          llr_i[i] = int'($floor(2.0 * y / (sigma * sigma) * 2.0 + 0.5));
          if (llr_i[i] > 15)  begin llr_i[i] = 15;  sat_llr++; end
          if (llr_i[i] < -15) begin llr_i[i] = -15; sat_llr++; end
        end
        if ((llr_i[i] < 0) != x[i]) bit_errors_ch++;
        frame_v[i] = {llr_i[i] < 0, 4'(llr_i[i] < 0 ? -llr_i[i] : llr_i[i])};
      end
      llr <= frame_v;
      if (sigma != 0.0) noisy_frames++;
      ue = ref_decode(N, mask, llr_i, cw);
      exp_u.push_back(ue);
      sent_u.push_back(u);
      exp_clean.push_back(sigma == 0.0);
      en_cha_alpha <= 1'b1;
      @(posedge clk);
      // random idle cycles between frames
      if ($urandom % 3 == 0) begin
        en_cha_alpha <= 1'b0;
        repeat (1 + $urandom % 4) @(posedge clk);
        gaps++;
      end else back_to_back++;
    end
    en_cha_alpha <= 1'b0;
    wait (got == FRAMES);
    repeat (2) @(posedge clk);
    // every mechanism must have been exercised
    checks++; if (gaps == 0)              begin failures++; $display("no idle gap"); end
    checks++; if (back_to_back == 0)      begin failures++; $display("no back-to-back input"); end
    checks++; if (out_back_to_back == 0)  begin failures++; $display("no back-to-back output"); end
    checks++; if (stats.spc_flips == 0)   begin failures++; $display("no SPC flip"); end
    checks++; if (stats.g_sat == 0)       begin failures++; $display("no G saturation"); end
    checks++; if (stats.rep_ones == 0)    begin failures++; $display("no REP one"); end
    checks++; if (stats.ro_spc == 0)      begin failures++; $display("no RO_SPC"); end
    checks++; if (stats.g_or == 0)        begin failures++; $display("no G_OR"); end
    checks++; if (stats.rate1 == 0)       begin failures++; $display("no Rate-1"); end
    checks++; if (frame_errors == 0)      begin failures++; $display("noise never caused a frame error"); end
    $display("frames=%0d noisy=%0d frame_errors=%0d gaps=%0d b2b_in=%0d b2b_out=%0d", FRAMES, noisy_frames,
             frame_errors, gaps, back_to_back, out_back_to_back);
    $display("spc_flips=%0d g_sat=%0d rep_ones=%0d ro_spc=%0d g_or=%0d rate1=%0d zero_llr=%0d sat_llr=%0d ch_bit_err=%0d stages=%0d",
             stats.spc_flips, stats.g_sat, stats.rep_ones, stats.ro_spc, stats.g_or, stats.rate1,
             stats.zero_llr, sat_llr, bit_errors_ch, dut.NSTAGE);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
