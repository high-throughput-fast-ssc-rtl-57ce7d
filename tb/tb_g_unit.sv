// tb_g_unit: checks the G stage and its variants against integer arithmetic: plain G with
// 5-bit inputs, G with 6-bit inputs (saturation at +/-31), G_OR (beta ignored), and
// G_without_complement (two's complement in and out).
module tb_g_unit;
  localparam int NH = 8;
  logic clk = 1'b0, en = 1'b0;
  logic [2*NH-1:0][4:0] a5 = '0;
  logic [2*NH-1:0][5:0] a6 = '0, a6tc = '0;
  logic [NH-1:0] b = '0;
  logic [NH-1:0][5:0] o_g5, o_g6, o_or, o_tc;
  int unsigned checks = 0, failures = 0, sats = 0;

  g_unit #(.NH(NH), .WIN(5), .WOUT(6)) dut_g5 (.clk, .en, .alpha(a5), .beta_l(b), .alpha_r(o_g5));
  g_unit #(.NH(NH), .WIN(6), .WOUT(6)) dut_g6 (.clk, .en, .alpha(a6), .beta_l(b), .alpha_r(o_g6));
  g_unit #(.NH(NH), .WIN(6), .WOUT(6), .ZERO_BETA(1'b1)) dut_or (.clk, .en, .alpha(a6), .beta_l(b), .alpha_r(o_or));
  g_unit #(.NH(NH), .WIN(6), .WOUT(6), .IN_TC(1'b1), .OUT_TC(1'b1)) dut_tc (.clk, .en, .alpha(a6tc), .beta_l(b), .alpha_r(o_tc));

  always #5 clk = ~clk;
  initial begin
    #(10 * 5000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [5:0] sm6(int v);
    return {v < 0, 5'(v < 0 ? -v : v)};
  endfunction
  function automatic int sat(int v);
    return v > 31 ? 31 : v < -31 ? -31 : v;
  endfunction

  initial begin
    int x5 [2*NH], x6 [2*NH];
    logic [2*NH-1:0][4:0] n5;
    logic [2*NH-1:0][5:0] n6, n6tc;
    logic [NH-1:0] nb;
    repeat (2) @(posedge clk);
    en <= 1'b1;
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < 2*NH; i++) begin
        x5[i] = int'($urandom % 31) - 15;
        x6[i] = int'($urandom % 63) - 31;
        n5[i] = {x5[i] < 0, 4'(x5[i] < 0 ? -x5[i] : x5[i])};
        n6[i] = sm6(x6[i]);
        n6tc[i] = 6'(x6[i]);
      end
      nb = NH'($urandom);
      a5 <= n5; a6 <= n6; a6tc <= n6tc; b <= nb;
      @(posedge clk);
      #1;
      for (int i = 0; i < NH; i++) begin
        int e5, e6, eor;
        e5  = nb[i] ? x5[i+NH] - x5[i] : x5[i+NH] + x5[i];
        e6  = sat(nb[i] ? x6[i+NH] - x6[i] : x6[i+NH] + x6[i]);
        eor = sat(x6[i+NH] + x6[i]);
        if (e6 == 31 || e6 == -31) sats++;
        checks += 4;
        if (o_g5[i] !== sm6(e5))  begin failures++; $display("G5 %0d %0d b%0d -> %h", x5[i], x5[i+NH], nb[i], o_g5[i]); end
        if (o_g6[i] !== sm6(e6))  begin failures++; $display("G6 %0d %0d b%0d -> %h", x6[i], x6[i+NH], nb[i], o_g6[i]); end
        if (o_or[i] !== sm6(eor)) begin failures++; $display("GOR %0d %0d -> %h", x6[i], x6[i+NH], o_or[i]); end
        if (o_tc[i] !== 6'(e6))   begin failures++; $display("GTC %0d %0d b%0d -> %h", x6[i], x6[i+NH], nb[i], o_tc[i]); end
      end
    end
    checks++;
    if (sats == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
