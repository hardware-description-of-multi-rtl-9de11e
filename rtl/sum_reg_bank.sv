// sum_reg_bank: the parallel MLP's 24 sum registers (Reg. 0 .. Reg. 23) and
// the 24:1 multiplexer that feeds them one at a time to the single
// activation unit.
//
// When `ld` is high, every register takes its functional unit's 23-bit
// accumulator on the same rising edge, so a whole layer is saved in one
// cycle and the functional units are free again. `q` is register `sel`
// (combinational mux; 0 for a select beyond N-1). The registers, the 24:1
// multiplexer and its 5-bit select come from the published design; the
// single load strobe is this design's choice.
module sum_reg_bank #(
  parameter int unsigned N     = 24,
  parameter int unsigned ACC_W = 23,
  parameter int unsigned SEL_W = 5
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ld,
  input  logic signed [ACC_W-1:0] d [N],
  input  logic [SEL_W-1:0]        sel,
  output logic signed [ACC_W-1:0] q
);
  logic signed [ACC_W-1:0] r [N];

  always_ff @(posedge clk) begin
    for (int i = 0; i < N; i++) begin
      if (!rst_n)  r[i] <= '0;
      else if (ld) r[i] <= d[i];
    end
  end

  assign q = (32'(sel) < N) ? r[sel] : '0;

endmodule
