// stage_fifo: alpha_memory / beta_memory between two pipeline stages.
//
// A pipeline stage produces a vector that a later stage reads again D stages downstream
// (the parent's alpha, reused by G after the left subtree; a left codeword, reused by C
// after the right subtree; a node's u bits, held until the output stage). Data is read in
// the order it was written, so the memory is a FIFO: a DEPTH = D entry array with a write
// address that advances with the writing stage's enable and a read address that advances
// with the reading stage's enable (two local_controller counters). Reads are asynchronous:
// dout shows the oldest entry during the cycle in which the reading stage is enabled. With
// D = 0 the two stages coincide and dout = din.
//
// Timing: wr_en is the enable of the stage in which din is valid, rd_en the enable of the
// stage D later. Since the pipeline never stalls, at most D frames are in flight between
// them; the assertions check that the FIFO neither overflows nor is read empty.
module stage_fifo #(
  parameter int W = 8,
  parameter int D = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic         rd_en,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  if (D == 0) begin : g_wire
    assign dout = din;
  end else begin : g_mem
    localparam int AW = (D > 1) ? $clog2(D) : 1;
    logic [W-1:0]  mem [D];
    logic [AW-1:0] waddr, raddr;
    logic [AW:0]   count;

    local_controller #(.DEPTH(D), .AW(AW)) u_wr (.clk, .rst_n, .stage_en(wr_en), .addr(waddr));
    local_controller #(.DEPTH(D), .AW(AW)) u_rd (.clk, .rst_n, .stage_en(rd_en), .addr(raddr));

    always_ff @(posedge clk) begin
      if (wr_en) mem[waddr] <= din;
    end
    assign dout = mem[raddr];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) count <= '0;
      else        count <= count + (AW+1)'(wr_en) - (AW+1)'(rd_en);
    end

    a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && count == 0))
      else $error("stage_fifo read while empty");
    a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                    !(wr_en && !rd_en && count == (AW+1)'(D)))
      else $error("stage_fifo overflow");
  end

endmodule
