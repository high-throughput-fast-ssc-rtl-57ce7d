// tb_stage_fifo: checks the alpha/beta memory as a delay between two pipeline stages.
//
// A stage-enable chain like the global controller's is driven with random gaps. Words are
// written with the enable of stage 0 and must come out, in order and unchanged, while the
// enable of stage D is high, for D = 0 (wire), 1, 2 and 7.
module tb_stage_fifo;
  localparam int W = 12;
  localparam int NDUT = 4;
  localparam int DS [NDUT] = '{0, 1, 2, 7};

  logic clk = 1'b0, rst_n = 1'b0, go = 1'b0;
  logic [8:1] v = '0;
  logic [8:0] ench;
  logic [W-1:0] din = '0;
  logic [W-1:0] dout [NDUT];
  int unsigned checks = 0, failures = 0, full_cycles = 0;

  assign ench = {v, go};

  for (genvar k = 0; k < NDUT; k++) begin : g_dut
    stage_fifo #(.W(W), .D(DS[k])) dut (
      .clk, .rst_n, .wr_en(ench[0]), .rd_en(ench[DS[k]]), .din, .dout(dout[k]));
  end

  always #5 clk = ~clk;
  initial begin
    #(10 * 10000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [W-1:0] q [NDUT][$];
  always @(posedge clk) begin
    v <= {v[7:1], go};
    if (rst_n) begin
      if (go) for (int k = 0; k < NDUT; k++) q[k].push_back(din);
      if (&ench[7:0]) full_cycles++;
      for (int k = 0; k < NDUT; k++) begin
        if (ench[DS[k]]) begin
          logic [W-1:0] e;
          e = q[k].pop_front();
          checks++;
          if (dout[k] !== e) begin failures++; $display("D=%0d: got %h expected %h", DS[k], dout[k], e); end
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < 1500; t++) begin
      din <= W'($urandom);
      go <= (t < 200) ? 1'b1 : ($urandom % 3 != 0);
      @(posedge clk);
    end
    go <= 1'b0;
    repeat (10) @(posedge clk);
    for (int k = 0; k < NDUT; k++) begin
      checks++;
      if (q[k].size() != 0) begin failures++; $display("D=%0d: %0d words never read", DS[k], q[k].size()); end
    end
    checks++;
    if (full_cycles == 0) begin failures++; $display("FIFO never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
