// tb_local_controller: checks the memory address counter: reset to zero, +1 per enabled
// cycle, hold otherwise, wrap from DEPTH-1 to 0, for DEPTH = 5 and 8.
module tb_local_controller;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [2:0] a5, a8;
  int unsigned checks = 0, failures = 0, wraps = 0;

  local_controller #(.DEPTH(5)) dut5 (.clk, .rst_n, .stage_en(en), .addr(a5));
  local_controller #(.DEPTH(8)) dut8 (.clk, .rst_n, .stage_en(en), .addr(a8));

  always #5 clk = ~clk;
  initial begin
    #(10 * 5000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n = 0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (a5 !== 3'd0 || a8 !== 3'd0) begin failures++; $display("not reset"); end
    rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      bit e;
      e = ($urandom % 3 != 0);
      en = e;
      @(posedge clk);
      #1;
      if (e) n++;
      if (e && n % 5 == 0) wraps++;
      checks += 2;
      if (a5 !== 3'(n % 5)) begin failures++; $display("DEPTH 5: %0d expected %0d", a5, n % 5); end
      if (a8 !== 3'(n % 8)) begin failures++; $display("DEPTH 8: %0d expected %0d", a8, n % 8); end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("no wrap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
