// tb_pf_statistics: drives the statistics block as the platform does. Frames are pushed at
// random times, and each one is checked a fixed latency later, once correct and sometimes
// with one bit flipped. The frame and error-frame counts are compared with the testbench's
// own tally, before and after `done`, and again after `clear`.
module tb_pf_statistics;
  localparam int N = 64, DEPTH = 64, LAT = 40;
  logic clk = 0, rst_n = 0, clear = 0, sv = 0, dv = 0, done;
  logic [31:0] num = 32'd150, frames, errs;
  logic [N-1:0] sent = '0, dec = '0;
  int unsigned checks = 0, failures = 0;

  pf_statistics #(.N(N), .DEPTH(DEPTH)) dut (.clk, .rst_n, .clear, .num_frames(num),
    .sent_valid(sv), .sent, .dec_valid(dv), .dec, .frames, .error_frames(errs), .done);

  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // a delay line plays the decoder: frame pushed at cycle c is checked at cycle c + LAT
  logic [N-1:0] pipe_d [LAT];
  logic         pipe_v [LAT];
  logic         pipe_e [LAT];
  int exp_frames = 0, exp_errs = 0;

  initial begin
    logic [N-1:0] f;
    bit e, v;
    for (int i = 0; i < LAT; i++) begin pipe_v[i] = 0; pipe_e[i] = 0; pipe_d[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 800; t++) begin
      @(negedge clk);
      // compare the counters with the tally
      checks++;
      if (frames != 32'(exp_frames) || errs != 32'(exp_errs) || done != (exp_frames >= int'(num))) begin
        failures++;
        $display("t=%0d frames %0d/%0d errs %0d/%0d done %b", t, frames, exp_frames, errs, exp_errs, done);
      end
      clear = (t == 500);
      v = ($urandom % 3) != 0;
      f = {$urandom, $urandom};
      e = ($urandom % 4) == 0;
      sv = v; sent = f;
      dv = pipe_v[LAT-1];
      dec = pipe_d[LAT-1] ^ (pipe_e[LAT-1] ? N'(1) << ($urandom % N) : '0);
      if (clear) begin exp_frames = 0; exp_errs = 0; end
      else if (dv && exp_frames < int'(num)) begin
        exp_frames++;
        if (pipe_e[LAT-1]) exp_errs++;
      end
      for (int i = LAT - 1; i > 0; i--) begin
        pipe_d[i] = pipe_d[i-1]; pipe_v[i] = pipe_v[i-1]; pipe_e[i] = pipe_e[i-1];
      end
      pipe_d[0] = f; pipe_v[0] = v; pipe_e[0] = e;
    end
    checks++;
    if (exp_errs == 0 || exp_frames == 0) begin failures++; $display("no errors exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
