// functional_unit: the multiply-accumulate processing element of one neuron.
//
// An 8 x 8 two's-complement multiplier produces a 16-bit product, which a
// sign-extension stage widens to 23 bits; a 23-bit adder adds it to the
// accumulator register, whose output is fed back to the adder. 23 bits hold
// the worst case of 220 products (220 * 2^14 < 2^22) without overflow.
// This structure and these widths are the published ones.
//
// Interface and timing (this design's choice): when `en` is high, the
// accumulator takes `acc + sext(x*w)` at the next rising clock edge, or just
// `sext(x*w)` when `first` is also high, so a new neuron starts without a
// separate clearing cycle. `acc` is the register output. Synchronous
// active-low reset clears the accumulator.
module functional_unit #(
  parameter int unsigned DATA_W   = 8,
  parameter int unsigned WEIGHT_W = 8,
  parameter int unsigned ACC_W    = 23
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       en,
  input  logic                       first,
  input  logic signed [DATA_W-1:0]   x,
  input  logic signed [WEIGHT_W-1:0] w,
  output logic signed [ACC_W-1:0]    acc
);
  localparam int unsigned PROD_W = DATA_W + WEIGHT_W;

  logic signed [PROD_W-1:0] prod;
  logic signed [ACC_W-1:0]  prod_ext;
  logic signed [ACC_W-1:0]  addend;

  always_comb begin
    prod     = x * w;                          // multiplier
    prod_ext = ACC_W'(prod);                   // sign extension (signed)
    addend   = first ? '0 : acc;               // feedback of the accumulator
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= addend + prod_ext;     // 23-bit adder
  end

endmodule
