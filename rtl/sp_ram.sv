// sp_ram: single-port synchronous RAM, one address port shared by reads and
// writes, as drawn for the input, hidden-output and weight memories.
//
// A write stores `wdata` at `addr` on the rising edge when `we` is high.
// Every cycle the word at `addr` is registered into `rdata` (read-first: a
// write returns the old word), so read data appear one cycle after the
// address. Registered read maps onto FPGA block or distributed RAM; that the
// read is synchronous is this design's choice. Contents are not reset.
module sp_ram #(
  parameter int unsigned DEPTH  = 256,
  parameter int unsigned WIDTH  = 8,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [WIDTH-1:0]  wdata,
  output logic [WIDTH-1:0]  rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && 32'(addr) < DEPTH) mem[addr] <= wdata;
    rdata <= (32'(addr) < DEPTH) ? mem[addr] : '0;
  end

endmodule
