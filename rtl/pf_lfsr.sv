// pf_lfsr: random information source of the decoder test platform.
//
// What it does: produces OUT_W fresh pseudo-random bits every enabled cycle, to be used as the
// information bits of one test frame.
// How it works: a 64-bit Fibonacci LFSR with the maximal-length feedback taps 64, 63, 61, 60
// (x^64 + x^63 + x^61 + x^60 + 1) is stepped OUT_W times per clock. The loop is unrolled, so
// the next state is a pure XOR network of the current one. Bit j of the output is the feedback
// bit of step j.
// Interface and timing: `load` copies `init_lfsr` into the state on the next edge (an all-zero
// seed, which would lock the LFSR, is replaced by 1). While `step` is high, the state advances
// and `bits` holds the new OUT_W bits from the following cycle on. The state is reset to 1.
// Source: the test platform names a random number generator seeded by the host through
// init_lfsr. The polynomial, the width and the bits-per-cycle scheme are this design's choice.
module pf_lfsr #(
  parameter int OUT_W = 1024
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [63:0]      init_lfsr,
  input  logic             step,
  output logic [OUT_W-1:0] bits
);

  logic [63:0] state;

  function automatic logic [63:0] advance(logic [63:0] s, output logic [OUT_W-1:0] b);
    logic fb;
    for (int j = 0; j < OUT_W; j++) begin
      fb   = s[63] ^ s[62] ^ s[60] ^ s[59];
      b[j] = fb;
      s    = {s[62:0], fb};
    end
    return s;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= 64'd1;
      bits  <= '0;
    end else if (load) begin
      state <= (init_lfsr == '0) ? 64'd1 : init_lfsr;
    end else if (step) begin
      logic [OUT_W-1:0] b;
      state <= advance(state, b);
      bits  <= b;
    end
  end

  a_never_zero: assert property (@(posedge clk) disable iff (!rst_n) state != '0);

endmodule
