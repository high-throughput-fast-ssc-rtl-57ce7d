// global_controller: first level of the two-level controller, one enable per pipeline stage.
//
// A frame enters the decoder in the cycle in which channel_en is high; stage k works on it
// k cycles later. The controller is therefore a chain of NSTAGE-1 flip-flops: en[0] is
// channel_en itself and en[k] is en[k-1] delayed by one clock. Each stage's registers load
// and each memory address advances only while that stage's enable is high, so gaps between
// input frames travel through the pipeline as idle stages. Reset clears every enable.
module global_controller #(
  parameter int NSTAGE = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              channel_en,
  output logic [NSTAGE-1:0] en
);

  logic [NSTAGE-1:1] q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= (NSTAGE-1)'({q, channel_en});
  end

  assign en = {q, channel_en};

endmodule
