// addr_counter: up-counter used as a memory address generator (the 8-bit
// synapse counter and the 5-bit neuron counter of the MLP datapaths).
//
// Priority on each rising edge: synchronous active-low reset to 0, then
// `ld` loads `ld_val`, then `inc` adds one (wrapping at 2^W). The count is
// the register output `q`. The published design gives the widths and what
// each counter addresses; the load input, used to start the 8-bit counter
// at the first weight of the output layer, is this design's choice.
module addr_counter #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ld,
  input  logic [W-1:0] ld_val,
  input  logic         inc,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (!rst_n)   q <= '0;
    else if (ld)  q <= ld_val;
    else if (inc) q <= q + W'(1);
  end
endmodule
