// tb_c_unit: checks the C stage, beta_v = {beta_r, beta_l ^ beta_r}, and that it only
// loads when enabled.
module tb_c_unit;
  localparam int NH = 16;
  logic clk = 1'b0, en = 1'b0;
  logic [NH-1:0] bl = '0, br = '0;
  logic [2*NH-1:0] bv;
  int unsigned checks = 0, failures = 0;

  c_unit #(.NH(NH)) dut (.clk, .en, .beta_l(bl), .beta_r(br), .beta_v(bv));

  always #5 clk = ~clk;
  initial begin
    #(10 * 5000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [NH-1:0] l, r;
    logic [2*NH-1:0] exp_v, prev;
    exp_v = '0;
    repeat (2) @(posedge clk);
    for (int t = 0; t < 200; t++) begin
      l = NH'($urandom); r = NH'($urandom);
      bl <= l; br <= r;
      en <= (t % 3 != 2);
      prev = bv;
      @(posedge clk);
      #1;
      checks++;
      if (t % 3 != 2) begin
        for (int i = 0; i < NH; i++) begin exp_v[i] = l[i] ^ r[i]; exp_v[i+NH] = r[i]; end
        if (bv !== exp_v) begin failures++; $display("C %h %h -> %h", l, r, bv); end
      end else if (bv !== prev) begin failures++; $display("C loaded without enable"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
