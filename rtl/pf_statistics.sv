// pf_statistics: error statistics of the decoder test platform.
//
// What it does: compares every decoded frame with the frame that was sent, and counts the
// frames and the error frames (frames with at least one wrong bit) until `num_frames` frames
// have been checked.
// How it works: the sent information bits are pushed into a first-in first-out buffer when
// they leave the source. Each decoded frame pops the oldest entry and is compared with it.
// The decoder keeps frame order and has a fixed latency, so DEPTH only has to cover the
// frames in flight, which is at least the decoder's stage count.
// Interface and timing: `sent_valid`/`sent` push a frame, and `dec_valid`/`dec` check one.
// `frames` and `error_frames` are updated on the edge after a check. `done` rises once
// `frames` reaches `num_frames`. `clear` restarts the counts. Checks after `done` are not
// counted. A frame must be pushed at least one cycle before it is checked (asserted); the
// decoder latency guarantees that.
// Source: the document says only that the statistics module counts the error frames and
// reports them to the host. The buffer, the counter widths and `done` are this design's
// choices.
module pf_statistics #(
  parameter int N     = 1024,
  parameter int DEPTH = 512
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic [31:0]  num_frames,
  input  logic         sent_valid,
  input  logic [N-1:0] sent,
  input  logic         dec_valid,
  input  logic [N-1:0] dec,
  output logic [31:0]  frames,
  output logic [31:0]  error_frames,
  output logic         done
);

  localparam int AW = $clog2(DEPTH);

  logic [N-1:0]  mem [DEPTH];
  logic [AW-1:0] wa, ra;
  logic [AW:0]   count;

  always_ff @(posedge clk) begin
    if (sent_valid) mem[wa] <= sent;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wa <= '0; ra <= '0; count <= '0;
      frames <= '0; error_frames <= '0;
    end else begin
      if (sent_valid) wa <= (wa == AW'(DEPTH-1)) ? '0 : wa + 1'b1;
      if (dec_valid)  ra <= (ra == AW'(DEPTH-1)) ? '0 : ra + 1'b1;
      count <= count + (AW+1)'(sent_valid) - (AW+1)'(dec_valid);
      if (clear) begin
        frames <= '0; error_frames <= '0;
      end else if (dec_valid && !done) begin
        frames <= frames + 1;
        if (dec != mem[ra]) error_frames <= error_frames + 1;
      end
    end
  end

  assign done = (frames >= num_frames);

  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) dec_valid |-> count != 0);
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) sent_valid |-> (count != (AW+1)'(DEPTH) || dec_valid));

endmodule
