// mlp_top: the two register-transfer-level versions of the 220-24-10
// speech-recognition MLP side by side, sharing only clock and reset.
//
// `s_*` ports belong to the serial version (one functional unit, 5588
// cycles per input vector), `p_*` ports to the node-parallel version (24
// functional units, 258 cycles per vector). Both compute the same function
// with the same number formats (see mlp_pkg) and have the same load /
// evaluate / read-out protocol, described in mlp_serial and mlp_parallel;
// they differ in the weight load address (13-bit {neuron, synapse} for the
// serial version, {unit, 8-bit address} for the parallel one).
module mlp_top
  import mlp_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // serial version
  input  logic                s_in_valid,
  input  logic [DATA_W-1:0]   s_in_data,
  output logic                s_in_ready,
  input  logic                s_w_we,
  input  logic [WADDR_W-1:0]  s_w_addr,
  input  logic [WEIGHT_W-1:0] s_w_data,
  input  logic [OADDR_W-1:0]  s_out_rd_addr,
  output logic [DATA_W-1:0]   s_out_rd_data,
  output logic [N_OUT-1:0]    s_word_bus,
  output logic                s_busy,
  output logic                s_done,
  // parallel version
  input  logic                p_in_valid,
  input  logic [DATA_W-1:0]   p_in_data,
  output logic                p_in_ready,
  input  logic                p_w_we,
  input  logic [CNT5_W-1:0]   p_w_unit,
  input  logic [CNT8_W-1:0]   p_w_addr,
  input  logic [WEIGHT_W-1:0] p_w_data,
  input  logic [OADDR_W-1:0]  p_out_rd_addr,
  output logic [DATA_W-1:0]   p_out_rd_data,
  output logic [N_OUT-1:0]    p_word_bus,
  output logic                p_busy,
  output logic                p_done
);

  mlp_serial u_serial (
    .clk, .rst_n,
    .in_valid(s_in_valid), .in_data(s_in_data), .in_ready(s_in_ready),
    .w_we(s_w_we), .w_addr(s_w_addr), .w_data(s_w_data),
    .out_rd_addr(s_out_rd_addr), .out_rd_data(s_out_rd_data),
    .word_bus(s_word_bus), .busy(s_busy), .done(s_done)
  );

  mlp_parallel u_parallel (
    .clk, .rst_n,
    .in_valid(p_in_valid), .in_data(p_in_data), .in_ready(p_in_ready),
    .w_we(p_w_we), .w_unit(p_w_unit), .w_addr(p_w_addr), .w_data(p_w_data),
    .out_rd_addr(p_out_rd_addr), .out_rd_data(p_out_rd_data),
    .word_bus(p_word_bus), .busy(p_busy), .done(p_done)
  );

endmodule
