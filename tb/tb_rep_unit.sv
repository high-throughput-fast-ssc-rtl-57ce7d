// tb_rep_unit: checks the REP decoder for 4 to 128 inputs against the sign of the exact
// sum, for sign-magnitude and (128 inputs) two's complement inputs, with frames streamed
// through the adder-tree pipeline with gaps. Also checks the stage counts the document
// gives: 4 -> 1, 8 -> 2, 16 -> 2, 64 -> 3, 128 -> 4 stages, and that each result appears
// exactly that many cycles after its inputs.
module tb_rep_unit;
  localparam int NI = 7;
  localparam int SIZES [NI] = '{4, 8, 16, 32, 64, 128, 128};
  localparam int EXP_ST [NI] = '{1, 2, 2, 3, 3, 4, 4};

  logic clk = 1'b0, go = 1'b0;
  logic [7:1] v = '0;
  logic [7:0] ench;
  logic [127:0][5:0] a_sm = '0, a_tc = '0;
  logic [NI-1:0] beta;
  int unsigned checks = 0, failures = 0, ones = 0;
  int st [NI];

  assign ench = {v, go};

  for (genvar k = 0; k < NI; k++) begin : g_dut
    localparam int NV = SIZES[k];
    localparam bit TC = (k == NI - 1);
    localparam int ST = fssc_pkg::rep_stages(NV);
    rep_unit #(.NV(NV), .W(6), .IN_TC(TC)) dut (
      .clk, .en(ench[ST-1:0]), .alpha(TC ? a_tc[NV-1:0] : a_sm[NV-1:0]), .beta(beta[k]));
    initial st[k] = dut.STAGES;
  end

  always #5 clk = ~clk;
  initial begin
    #(10 * 5000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  bit q [NI][$];
  always_ff @(posedge clk) v <= {v[6:1], go};
  // results are compared mid-cycle, when every register has settled
  always @(negedge clk) begin
    for (int k = 0; k < NI; k++) begin
      if (ench[st[k]]) begin
        bit e;
        e = q[k].pop_front();
        checks++;
        if (beta[k] !== e) begin failures++; $display("REP%0d: got %0b expected %0b", SIZES[k], beta[k], e); end
      end
    end
  end

  initial begin
    int x [128];
    logic [127:0][5:0] nsm, ntc;
    #1;
    for (int k = 0; k < NI; k++) begin
      checks++;
      if (st[k] != EXP_ST[k]) begin failures++; $display("REP%0d has %0d stages, expected %0d", SIZES[k], st[k], EXP_ST[k]); end
    end
    repeat (2) @(posedge clk);
    for (int t = 0; t < 400; t++) begin
      int bias;
      bias = int'($urandom % 7) - 3;
      for (int i = 0; i < 128; i++) begin
        x[i] = int'($urandom % 63) - 31 + bias;
        if (x[i] > 31) x[i] = 31;
        if (x[i] < -31) x[i] = -31;
        nsm[i] = {x[i] < 0, 5'(x[i] < 0 ? -x[i] : x[i])};
        ntc[i] = 6'(x[i]);
      end
      if (t % 50 == 7) begin   // exact zero sum for every size: decision 0
        for (int i = 0; i < 128; i++) begin
          x[i] = (i % 2) ? 9 : -9; nsm[i] = {x[i] < 0, 5'd9}; ntc[i] = 6'(x[i]);
        end
      end
      for (int k = 0; k < NI; k++) begin
        int s;
        s = 0;
        for (int i = 0; i < SIZES[k]; i++) s += x[i];
        q[k].push_back(s < 0);
        if (s < 0) ones++;
      end
      a_sm <= nsm; a_tc <= ntc;
      go <= 1'b1;
      @(posedge clk);
      if ($urandom % 4 == 0) begin go <= 1'b0; repeat (1 + $urandom % 3) @(posedge clk); end
    end
    go <= 1'b0;
    repeat (8) @(posedge clk);
    for (int k = 0; k < NI; k++) begin
      checks++;
      if (q[k].size() != 0) begin failures++; $display("REP%0d: %0d results missing", SIZES[k], q[k].size()); end
    end
    checks++;
    if (ones == 0) begin failures++; $display("decision 1 never tested"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
