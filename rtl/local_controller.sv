// local_controller: address counter of one alpha or beta memory, driven by a stage enable.
//
// The second level of the two-level controller: each memory port owns a counter that
// advances by one, modulo DEPTH, whenever the stage that uses the port is enabled
// (the address buses of the document's controller timing). Reset returns it to zero.
module local_controller #(
  parameter int DEPTH = 4,
  parameter int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          stage_en,
  output logic [AW-1:0] addr
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             addr <= '0;
    else if (stage_en)      addr <= (addr == AW'(DEPTH - 1)) ? '0 : addr + 1'b1;
  end

endmodule
