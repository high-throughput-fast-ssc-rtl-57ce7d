// fssc_ref_pkg: bit-accurate software model of Fast-SSC decoding, for the testbenches.
//
// Written independently of the RTL: a plain depth-first walk of the decoding tree with an
// explicit stack, integer LLRs (in units of the LSB) and the same fixed-point rules as the
// hardware: F = sign product times minimum magnitude, G = b +/- a saturated at +/-GSAT, REP =
// sign of the exact sum, SPC (length 4) = hard decisions with the last least-reliable bit
// flipped on odd parity, Rate-1 = hard decisions, Rate-0 = zeros. Leaves return their u bits
// through the G_N butterfly. It also counts the pipeline stages the hardware should need
// and how often each mechanism was exercised.
package fssc_ref_pkg;

  localparam int RN   = 1024;
  localparam int RLOG = 10;
  localparam int GSAT = 31;

  typedef int unsigned cnt_t;
  typedef struct {
    cnt_t spc_flips;      // SPC decodes that flipped a bit
    cnt_t g_sat;          // G results clipped to +/-GSAT
    cnt_t rep_ones;       // REP decodes that decided 1
    cnt_t ro_spc;         // RO_SPC merged decodes
    cnt_t g_or;           // G with Rate-0 left sibling
    cnt_t rate1;          // Rate-1 leaves
    cnt_t zero_llr;       // F/G results equal to zero
  } ref_stats_t;

  ref_stats_t stats;

  // 0 Rate-0, 1 Rate-1, 2 REP, 3 SPC, 4 split
  function automatic int ref_type(int nv, int off, logic [RN-1:0] mask);
    int ones = 0;
    for (int i = 0; i < nv; i++) if (mask[off+i]) ones++;
    if (ones == 0) return 0;
    if (ones == nv) return 1;
    if (nv >= 2 && ones == 1 && mask[off+nv-1]) return 2;
    if (nv == 4 && ones == 3 && !mask[off]) return 3;
    return 4;
  endfunction

  // x = u * G_N (also the inverse transform)
  function automatic logic [RN-1:0] ref_polar_transform(int nv, int off, logic [RN-1:0] v);
    logic [RN-1:0] r;
    r = v;
    for (int s = 1; s < nv; s *= 2)
      for (int i = 0; i < nv; i++)
        if ((i & s) == 0) r[off+i] = r[off+i] ^ r[off+i+s];
    return r;
  endfunction

  // Polarization-weight information set, K largest weights (ties: larger index wins)
  function automatic logic [RN-1:0] ref_pw_mask(int n, int k);
    real w [RN];
    logic [RN-1:0] m;
    int rank;
    for (int i = 0; i < n; i++) begin
      w[i] = 0.0;
      for (int j = 0; j < 16; j++) if ((i >> j) & 1) w[i] += 2.0 ** (j / 4.0);
    end
    m = '0;
    for (int i = 0; i < n; i++) begin
      rank = 0;   // number of indices ranked above i
      for (int j = 0; j < n; j++)
        if (w[j] > w[i] + 1e-9 || (w[j] > w[i] - 1e-9 && j > i)) rank++;
      if (rank < k) m[i] = 1'b1;
    end
    return m;
  endfunction

  // Number of pipeline stages of the unrolled decoder, input and output registers excluded:
  // a walk over the pruned tree adding the stages of each operation.
  function automatic int ref_stages_r(int nv, int off, logic [RN-1:0] mask, bit need);
    // explicit stack of (size, offset, need)
    int ssz [64], sof [64];
    bit snd [64];
    int sp, total, sz, of, t, tl, tr, l;
    bit nd;
    sp = 0; total = 0;
    ssz[0] = nv; sof[0] = off; snd[0] = need; sp = 1;
    while (sp > 0) begin
      sp--; sz = ssz[sp]; of = sof[sp]; nd = snd[sp];
      t = ref_type(sz, of, mask);
      if (t == 3) total += 1;
      else if (t == 2) begin
        l = 0;
        while ((1 << l) < sz) l++;
        total += (l + 1) / 2;
      end else if (t == 4) begin
        tl = ref_type(sz / 2, of, mask);
        tr = ref_type(sz / 2, of + sz / 2, mask);
        if (tl == 0 && tr == 3) total += 1;
        else if (tl == 0) begin
          total += 1;
          ssz[sp] = sz / 2; sof[sp] = of + sz / 2; snd[sp] = nd; sp++;
        end else begin
          total += 2 + int'(nd);
          ssz[sp] = sz / 2; sof[sp] = of;          snd[sp] = 1'b1; sp++;
          ssz[sp] = sz / 2; sof[sp] = of + sz / 2; snd[sp] = nd;   sp++;
        end
      end
    end
    return total;
  endfunction

  function automatic int f_op(int a, int b);
    int m;
    m = (a < 0 ? -a : a) < (b < 0 ? -b : b) ? (a < 0 ? -a : a) : (b < 0 ? -b : b);
    if (m == 0) stats.zero_llr++;
    return ((a < 0) != (b < 0)) ? -m : m;
  endfunction

  function automatic int g_op(int a, int b, bit beta);
    int s;
    s = beta ? b - a : b + a;
    if (s > GSAT)  begin s = GSAT;  stats.g_sat++; end
    if (s < -GSAT) begin s = -GSAT; stats.g_sat++; end
    if (s == 0) stats.zero_llr++;
    return s;
  endfunction

  // Decode one frame. llr[i] is the channel LLR of bit i; returns u estimates (also the
  // codeword estimate through cw).
  function automatic logic [RN-1:0] ref_decode(int n, logic [RN-1:0] mask, input int llr [RN],
                                               output logic [RN-1:0] cw);
    int   alpha [RLOG+2][RN];
    logic [RN-1:0] beta [RLOG+2];
    logic [RN-1:0] betal [RLOG+2];
    logic [RN-1:0] u;
    int   sd [RLOG+2], sj [RLOG+2], sph [RLOG+2];
    int   sp, d, j, ph, nv, base, h, t, tl, tr, sum, mi, mv;
    bit   par;
    u = '0;
    for (int i = 0; i < n; i++) alpha[0][i] = llr[i];
    sd[0] = 0; sj[0] = 0; sph[0] = 0; sp = 1;
    while (sp > 0) begin
      d = sd[sp-1]; j = sj[sp-1]; ph = sph[sp-1];
      nv = n >> d; base = j * nv; h = nv / 2;
      if (ph == 0) begin
        t = ref_type(nv, base, mask);
        if (t != 4) begin
          beta[d] = '0;
          case (t)
            1: begin
              stats.rate1++;
              for (int i = 0; i < nv; i++) beta[d][i] = alpha[d][i] < 0;
            end
            2: begin
              sum = 0;
              for (int i = 0; i < nv; i++) sum += alpha[d][i];
              for (int i = 0; i < nv; i++) beta[d][i] = sum < 0;
              if (sum < 0) stats.rep_ones++;
            end
            3: begin
              par = 0; mi = 0; mv = 1 << 30;
              for (int i = 0; i < 4; i++) begin
                beta[d][i] = alpha[d][i] < 0;
                par ^= beta[d][i];
                if ((alpha[d][i] < 0 ? -alpha[d][i] : alpha[d][i]) <= mv) begin
                  mv = alpha[d][i] < 0 ? -alpha[d][i] : alpha[d][i];
                  mi = i;
                end
              end
              if (par) begin beta[d][mi] = !beta[d][mi]; stats.spc_flips++; end
            end
            default: ;
          endcase
          // u bits of this leaf
          begin
            logic [RN-1:0] tmp;
            tmp = ref_polar_transform(nv, 0, beta[d]);
            for (int i = 0; i < nv; i++) u[base+i] = tmp[i];
          end
          sp--;
        end else begin
          tl = ref_type(h, base, mask);
          tr = ref_type(h, base + h, mask);
          if (tl == 0) begin
            stats.g_or++;
            if (tr == 3) stats.ro_spc++;
          end
          for (int i = 0; i < h; i++) alpha[d+1][i] = f_op(alpha[d][i], alpha[d][i+h]);
          sph[sp-1] = 1;
          sd[sp] = d + 1; sj[sp] = 2 * j; sph[sp] = 0; sp++;
        end
      end else if (ph == 1) begin
        betal[d] = beta[d+1];
        for (int i = 0; i < h; i++) alpha[d+1][i] = g_op(alpha[d][i], alpha[d][i+h], betal[d][i]);
        sph[sp-1] = 2;
        sd[sp] = d + 1; sj[sp] = 2 * j + 1; sph[sp] = 0; sp++;
      end else begin
        beta[d] = '0;
        for (int i = 0; i < h; i++) begin
          beta[d][i]   = betal[d][i] ^ beta[d+1][i];
          beta[d][i+h] = beta[d+1][i];
        end
        sp--;
      end
    end
    cw = beta[0];
    return u;
  endfunction

endpackage
