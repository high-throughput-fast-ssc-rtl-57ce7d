// tb_spc4_unit: checks the length-4 SPC decoder and the merged RO_SPC variant against a
// direct model: hard decisions, parity, and on odd parity the flip of the least reliable
// bit, the later index winning ties. Magnitudes are drawn from a small range so that ties
// are frequent.
module tb_spc4_unit;
  logic clk = 1'b0, en = 1'b0;
  logic [3:0][4:0] a4 = '0;
  logic [7:0][4:0] a8 = '0;
  logic [3:0] b4;
  logic [7:0] b8;
  int unsigned checks = 0, failures = 0, flips = 0, ties = 0;

  spc4_unit #(.W(5)) dut (.clk, .en, .alpha(a4), .beta(b4));
  spc4_unit #(.W(5), .RO(1'b1), .WOUT(6)) dut_ro (.clk, .en, .alpha(a8), .beta(b8));

  always #5 clk = ~clk;
  initial begin
    #(10 * 10000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [3:0] model(int x [4]);
    logic [3:0] h;
    int mi, mv;
    mv = 1 << 30; mi = 0;
    for (int i = 0; i < 4; i++) begin
      h[i] = x[i] < 0;
      if ((x[i] < 0 ? -x[i] : x[i]) <= mv) begin mv = x[i] < 0 ? -x[i] : x[i]; mi = i; end
    end
    if (^h) h[mi] = !h[mi];
    return h;
  endfunction

  initial begin
    int x [4], y [8], s [4];
    logic [3:0][4:0] n4;
    logic [7:0][4:0] n8;
    logic [3:0] e4, e8;
    repeat (2) @(posedge clk);
    en <= 1'b1;
    for (int t = 0; t < 2000; t++) begin
      int r;
      r = (t % 2) ? 4 : 16;
      for (int i = 0; i < 4; i++) begin
        x[i] = int'($urandom % (2 * r - 1)) - (r - 1);
        n4[i] = {x[i] < 0, 4'(x[i] < 0 ? -x[i] : x[i])};
      end
      for (int i = 0; i < 8; i++) begin
        y[i] = int'($urandom % 31) - 15;
        n8[i] = {y[i] < 0, 4'(y[i] < 0 ? -y[i] : y[i])};
      end
      for (int i = 0; i < 4; i++) s[i] = y[i] + y[i+4];
      e4 = model(x);
      e8 = model(s);
      if (^{x[0] < 0, x[1] < 0, x[2] < 0, x[3] < 0}) flips++;
      for (int i = 0; i < 4; i++)
        for (int j = i + 1; j < 4; j++)
          if ((x[i] < 0 ? -x[i] : x[i]) == (x[j] < 0 ? -x[j] : x[j])) ties++;
      a4 <= n4; a8 <= n8;
      @(posedge clk);
      #1;
      checks += 2;
      if (b4 !== e4) begin failures++; $display("SPC %0d %0d %0d %0d -> %b expected %b", x[0], x[1], x[2], x[3], b4, e4); end
      if (b8 !== {e8, e8}) begin failures++; $display("RO_SPC -> %b expected %b", b8, {e8, e8}); end
    end
    checks++;
    if (flips == 0 || ties == 0) begin failures++; $display("flip or tie never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
