// tb_pf_polar_encoder: checks the test-platform encoder. A (64,32) instance is compared with
// the matrix definition x_j = XOR of u_i over all i whose binary digits include those of j.
// The default (1024,512) instance is checked for two properties: encoding twice gives back
// the masked input, and the result matches the reference package's transform. Frames arrive
// with random gaps, and the valid timing is checked.
module tb_pf_polar_encoder;
  import fssc_pkg::*;
  import fssc_ref_pkg::*;
  localparam logic [63:0] M64 = 64'hfffefec0fc808000;
  localparam int N = 1024;
  localparam logic [N-1:0] MK = INFO_MASK_1024_512;

  logic clk = 0, rst_n = 0, v_in = 0;
  logic [63:0] u64 = '0, x64, uo64;
  logic [N-1:0] u1k = '0, x1k, uo1k;
  logic v64, v1k;
  int unsigned checks = 0, failures = 0;

  pf_polar_encoder #(.N(64), .INFO_MASK(M64)) d64 (.clk, .rst_n, .valid_in(v_in), .u(u64),
                                                   .valid_out(v64), .u_out(uo64), .x(x64));
  pf_polar_encoder dflt (.clk, .rst_n, .valid_in(v_in), .u(u1k),
                         .valid_out(v1k), .u_out(uo1k), .x(x1k));

  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [63:0] e64, a64;
    logic [N-1:0] a1k, e1k;
    bit sent;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      sent = ($urandom % 3) != 0;
      a64 = {$urandom, $urandom};
      for (int w = 0; w < N / 32; w++) a1k[w*32 +: 32] = $urandom;
      v_in = sent; u64 = a64; u1k = a1k;
      @(negedge clk);
      v_in = 0;
      checks++;
      if (v64 !== sent || v1k !== sent) begin failures++; $display("valid wrong at %0d", t); end
      if (sent) begin
        e64 = '0;
        for (int j = 0; j < 64; j++)
          for (int i = 0; i < 64; i++)
            if ((i & j) == j) e64[j] ^= a64[i] & M64[i];
        checks += 4;
        if (x64 !== e64) begin failures++; $display("x64 %h expected %h", x64, e64); end
        if (uo64 !== (a64 & M64)) failures++;
        e1k = ref_polar_transform(N, 0, a1k & MK);
        if (x1k !== e1k) begin failures++; $display("x1024 mismatch at %0d", t); end
        if (ref_polar_transform(N, 0, x1k) !== (a1k & MK) || uo1k !== (a1k & MK)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
