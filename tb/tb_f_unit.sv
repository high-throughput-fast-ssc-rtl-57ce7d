// tb_f_unit: checks the F stage against integer min-sum arithmetic, for sign-magnitude
// inputs and for two's complement inputs (F_with_front_complement), and its one-cycle
// load-on-enable timing.
module tb_f_unit;
  localparam int NH = 8;
  logic clk = 1'b0, en = 1'b0;
  logic [2*NH-1:0][5:0] a_sm = '0, a_tc = '0;
  logic [NH-1:0][5:0]   o_sm, o_tc;
  int unsigned checks = 0, failures = 0;

  f_unit #(.NH(NH), .W(6), .IN_TC(1'b0)) dut_sm (.clk, .en, .alpha(a_sm), .alpha_l(o_sm));
  f_unit #(.NH(NH), .W(6), .IN_TC(1'b1)) dut_tc (.clk, .en, .alpha(a_tc), .alpha_l(o_tc));

  always #5 clk = ~clk;
  initial begin
    #(10 * 5000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [5:0] sm(int v);
    return {v < 0, 5'(v < 0 ? -v : v)};
  endfunction

  initial begin
    int va [2*NH];
    logic [NH-1:0][5:0] prev;
    logic [2*NH-1:0][5:0] nsm, ntc;
    repeat (2) @(posedge clk);
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < 2*NH; i++) begin
        va[i] = int'($urandom % 63) - 31;
        if ($urandom % 8 == 0) va[i] = 0;
        nsm[i] = sm(va[i]);
        ntc[i] = 6'(va[i]);
      end
      a_sm <= nsm;
      a_tc <= ntc;
      en <= (t % 5 != 4);
      prev = o_sm;
      @(posedge clk);
      #1;
      for (int i = 0; i < NH; i++) begin
        int m, e;
        m = (va[i] < 0 ? -va[i] : va[i]);
        if ((va[i+NH] < 0 ? -va[i+NH] : va[i+NH]) < m) m = (va[i+NH] < 0 ? -va[i+NH] : va[i+NH]);
        e = ((va[i] < 0) != (va[i+NH] < 0)) ? -m : m;
        checks += 2;
        if (t % 5 != 4) begin
          if (o_sm[i] !== sm(e)) begin failures++; $display("SM %0d %0d -> %h", va[i], va[i+NH], o_sm[i]); end
          if (o_tc[i] !== sm(e)) begin failures++; $display("TC %0d %0d -> %h", va[i], va[i+NH], o_tc[i]); end
        end else begin
          if (o_sm[i] !== prev[i]) begin failures++; $display("register changed without enable"); end
          checks--;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
