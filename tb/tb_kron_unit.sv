// tb_kron_unit: checks the Kronecker power module against a direct matrix product
// u_i = XOR of beta_j over all j whose binary digits include those of i (the entries of
// F^(kron n)), for an unmasked 8-bit unit and a 16-bit unit whose frozen outputs are zero.
module tb_kron_unit;
  localparam logic [15:0] M16 = 16'hfe80;
  logic [7:0]  b8 = '0, u8;
  logic [15:0] b16 = '0, u16;
  int unsigned checks = 0, failures = 0;

  kron_unit #(.NV(8))                dut8  (.beta(b8), .u(u8));
  kron_unit #(.NV(16), .MASK(M16))   dut16 (.beta(b16), .u(u16));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] e8;
    logic [15:0] e16, x;
    for (int t = 0; t < 256; t++) begin
      b8 = 8'(t);
      e8 = '0;
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++)
          if ((i & j) == i) e8[i] ^= b8[j];
      #1;
      checks++;
      if (u8 !== e8) begin failures++; $display("kron8 %h -> %h expected %h", b8, u8, e8); end
    end
    for (int t = 0; t < 300; t++) begin
      // a codeword of the (16,8) code: encode random information bits
      logic [15:0] uu;
      uu = 16'($urandom) & M16;
      x = '0;
      for (int j = 0; j < 16; j++)
        for (int i = 0; i < 16; i++)
          if ((i & j) == j) x[j] ^= uu[i];
      b16 = (t % 2) ? x : 16'($urandom);
      e16 = '0;
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++)
          if ((i & j) == i) e16[i] ^= b16[j];
      e16 &= M16;
      #1;
      checks++;
      if (u16 !== e16) begin failures++; $display("kron16 %h -> %h expected %h", b16, u16, e16); end
      if (t % 2) begin
        checks++;
        if (u16 !== uu) begin failures++; $display("kron16 did not invert the encoder"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
