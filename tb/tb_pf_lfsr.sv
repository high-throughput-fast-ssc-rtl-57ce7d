// tb_pf_lfsr: checks the test-platform LFSR against a bit-serial model of the same
// x^64 + x^63 + x^61 + x^60 + 1 register, for several seeds including the all-zero seed, with
// load and step pulses at random. It also checks that the output is balanced (40-60 % ones
// over many words) and never stuck.
module tb_pf_lfsr;
  localparam int OW = 48;
  logic clk = 0, rst_n = 0, load = 0, step = 0;
  logic [63:0] seed = '0;
  logic [OW-1:0] bits;
  int unsigned checks = 0, failures = 0;

  pf_lfsr #(.OUT_W(OW)) dut (.clk, .rst_n, .load, .init_lfsr(seed), .step, .bits);

  always #5 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [63:0] ms;       // model state
  logic [OW-1:0] mb;     // model output
  longint ones = 0, total = 0;

  task automatic model_step();
    logic fb;
    for (int j = 0; j < OW; j++) begin
      fb = ms[63] ^ ms[62] ^ ms[60] ^ ms[59];
      mb[j] = fb;
      ms = {ms[62:0], fb};
    end
  endtask

  initial begin
    ms = 64'd1; mb = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      checks++;
      if (bits !== mb) begin
        failures++;
        if (failures < 10) $display("t=%0d bits %h expected %h", t, bits, mb);
      end
      load = 0; step = 0;
      if (t % 700 == 5) begin
        load = 1;
        seed = (t == 705) ? 64'd0 : {$urandom, $urandom};
      end else begin
        step = ($urandom % 4) != 0;
      end
      @(posedge clk);
      if (load) ms = (seed == '0) ? 64'd1 : seed;
      else if (step) begin
        model_step();
        ones += longint'($countones(mb)); total += longint'(OW);
      end
    end
    checks++;
    if (ones * 10 < total * 4 || ones * 10 > total * 6) begin
      failures++; $display("unbalanced: %0d ones of %0d", ones, total);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
