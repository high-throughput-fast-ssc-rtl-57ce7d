// fssc_pkg: shared constants and elaboration-time helpers of the unrolled Fast-SSC decoder.
//
// Holds the fixed-point format, the default information-bit set of the (1024,512) code and
// the functions that classify a node of the decoding tree and work out how many pipeline
// stages a subtree occupies. Every module of the decoder derives its structure from these
// functions, so the whole pipeline follows from one parameter: the information-bit mask.
//
// Number format: LLRs are sign-magnitude words. Channel LLRs and every LLR that only passed
// through F operations use QCF = 5 bits; LLRs produced by a G operation use QI = 6 bits and
// saturate at +/-31. QF = 1 of those bits is fractional (it only matters to whoever scales
// the channel LLRs). This is the (6,5,1) scheme; where exactly the 5-bit region ends is this
// design's choice.
//
// Information set: the document does not say how its (1024,512) code was constructed. The
// default mask is the polarization-weight construction, weight(i) = sum_j b_j(i)*2^(j/4)
// over the binary digits b_j of the index i, taking the K indices of largest weight (ties go
// to the larger index). Bit i of a mask is 1 when u_i is an information bit.
package fssc_pkg;

  localparam int MAXN = 1024;          // largest code length a mask parameter can hold
  localparam int QCF  = 5;             // channel and F-only LLR width
  localparam int QI   = 6;             // width of LLRs that went through a G operation
  localparam int QF   = 1;             // fractional bits of every LLR word
  localparam int G_TC_MIN = 256;       // a G with at least this many inputs leaves its result in two's complement

  localparam logic [MAXN-1:0] INFO_MASK_1024_512 = 1024'hfffffffffffffffffffffffffffffffefffffffffffffffefffffffcffe8e880fffffffffffffff8fffffee8fee8c000fffefee0fc808000e880800000000000fffffffffffefee8fffefec0f8808000fffce880e8800000e000000000000000fee8e800c0000000800000000000000080000000000000000000000000000000;

  typedef enum logic [2:0] {
    NODE_RATE0,   // all frozen: codeword is zero
    NODE_RATE1,   // all information: hard decision per bit
    NODE_REP,     // only the last bit is information: sum and sign
    NODE_SPC,     // only the first bit frozen, length 4: single parity check
    NODE_OTHER    // split into two children
  } node_t;

  // Type of the node whose information mask occupies bits [nv-1:0] of mask.
  function automatic node_t node_type(int nv, logic [MAXN-1:0] mask);
    int ones;
    ones = 0;
    for (int i = 0; i < nv; i++) ones += int'(mask[i]);
    if (ones == 0) return NODE_RATE0;
    if (ones == nv) return NODE_RATE1;
    if (nv >= 2 && ones == 1 && mask[nv-1]) return NODE_REP;
    if (nv == 4 && ones == 3 && !mask[0]) return NODE_SPC;
    return NODE_OTHER;
  endfunction

  // Pipeline stages of a REP node: two adder levels per stage, the first stage takes one
  // level when the number of levels is odd (4 -> 1, 8 -> 2, 16 -> 2, 64 -> 3, 128 -> 4).
  function automatic int rep_stages(int nv);
    int l;
    l = $clog2(nv);
    return (l + 1) / 2 < 1 ? 1 : (l + 1) / 2;
  endfunction

  // Width of the result of a G operation whose inputs are win bits wide.
  function automatic int g_width(int win);
    return (win + 1 > QI) ? QI : win + 1;
  endfunction

  // Number of pipeline stages the pruned subtree of a node occupies. Walks the subtree
  // breadth first (heap numbering, node k has children 2k and 2k+1) and adds the stages
  // of each operation: F, G and C for a split node (C only when the parent needs this
  // node's codeword), one G_OR when the left child is Rate-0, one stage for RO_SPC and SPC,
  // rep_stages() for REP, none for Rate-0 and Rate-1.
  function automatic int subtree_latency(int nv, logic [MAXN-1:0] mask, bit need_beta);
    logic [2*MAXN-1:0] live, need;
    int lat, lvl, sz, off;
    node_t t, tl, tr;
    live = '0;
    need = '0;
    live[1] = 1'b1;
    need[1] = need_beta;
    lat = 0;
    for (int k = 1; k < 2 * nv; k++) begin
      if (live[k]) begin
        lvl = $clog2(k + 1) - 1;
        sz  = nv >> lvl;
        off = (k - (1 << lvl)) * sz;
        t   = node_type(sz, mask >> off);
        if (t == NODE_REP) lat += rep_stages(sz);
        else if (t == NODE_SPC) lat += 1;
        else if (t == NODE_OTHER) begin
          tl = node_type(sz / 2, mask >> off);
          tr = node_type(sz / 2, mask >> (off + sz / 2));
          if (tl == NODE_RATE0) begin
            lat += 1;
            if (tr != NODE_SPC) begin
              live[2*k+1] = 1'b1;
              need[2*k+1] = need[k];
            end
          end else begin
            lat += 2 + int'(need[k]);
            live[2*k]   = 1'b1;
            need[2*k]   = 1'b1;
            live[2*k+1] = 1'b1;
            need[2*k+1] = need[k];
          end
        end
      end
    end
    return lat;
  endfunction

endpackage
