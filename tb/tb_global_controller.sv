// tb_global_controller: checks that stage enable k is the channel-valid input delayed by k
// clocks, that enable 0 follows the input in the same cycle, and that reset clears all.
module tb_global_controller;
  localparam int NS = 12;
  logic clk = 1'b0, rst_n = 1'b0, ch = 1'b0;
  logic [NS-1:0] en;
  int unsigned checks = 0, failures = 0;
  logic [NS-1:0] hist = '0;   // hist[k] = input k cycles ago

  global_controller #(.NSTAGE(NS)) dut (.clk, .rst_n, .channel_en(ch), .en);

  always #5 clk = ~clk;
  initial begin
    #(10 * 5000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (en !== '0) begin failures++; $display("enables not cleared by reset"); end
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      ch = ($urandom % 2);
      #1;
      hist[0] = ch;
      checks++;
      if (en !== hist) begin failures++; $display("t=%0d en=%b expected %b", t, en, hist); end
      @(posedge clk);
      #1;
      hist = {hist[NS-2:0], 1'b0};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
