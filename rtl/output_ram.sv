// output_ram: the small RAM that receives the 10 output-layer activations
// and drives the 10-line output bus.
//
// Writes (`we`, 4-bit `addr`, 8-bit `wdata`) arrive one per output neuron in
// address order 0..N-1. Besides storing the words, the block keeps the
// largest activation written since `clr` and its address, and drives
// `word_bus` with one line per recognisable word: the line of the largest
// output is high (first one on a tie), all others low. The host can read any
// stored activation through the asynchronous port `rd_addr`/`rd_data`.
// The 10-entry RAM, its 4-bit address and the 10-bit output bus are the
// published ones; reading the bus as a one-hot "winning word" and the host
// read port are this design's choices.
//
// Timing: a write is visible on `rd_data` and `word_bus` after the rising
// edge that takes it. `clr` (synchronous) forgets the running maximum.
module output_ram #(
  parameter int unsigned N_OUT  = 10,
  parameter int unsigned WIDTH  = 8,
  parameter int unsigned ADDR_W = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [WIDTH-1:0]  wdata,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [WIDTH-1:0]  rd_data,
  output logic [N_OUT-1:0]  word_bus
);
  logic [WIDTH-1:0]  mem [N_OUT];
  logic              have_max;
  logic [WIDTH-1:0]  max_val;
  logic [ADDR_W-1:0] max_idx;
  logic              in_range;

  assign in_range = 32'(addr) < N_OUT;

  always_ff @(posedge clk) begin
    if (we && in_range) mem[addr] <= wdata;
  end

  // running maximum over the words written so far (signed compare)
  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      have_max <= 1'b0;
      max_val  <= '0;
      max_idx  <= '0;
    end else if (we && in_range &&
                 (!have_max || $signed(wdata) > $signed(max_val))) begin
      have_max <= 1'b1;
      max_val  <= wdata;
      max_idx  <= addr;
    end
  end

  always_comb begin
    rd_data  = (32'(rd_addr) < N_OUT) ? mem[rd_addr] : '0;
    word_bus = '0;
    if (have_max) word_bus[max_idx] = 1'b1;
  end

endmodule
