// mlp_serial: serial register-transfer-level MLP (220 inputs, 24 hidden,
// 10 outputs) built around a single functional unit.
//
// Data path: an input RAM (220 words) and a hidden-output RAM (24 words)
// hold the synaptic signals of the two layers, a 2:1 mux picks the one of
// the current layer for the functional unit; one weight RAM of 2^13 words
// is addressed by the 5-bit neuron counter (upper bits) concatenated with
// the 8-bit synapse counter (lower bits). The 23-bit sum goes through the
// sigmoid table, and the 8-bit activation is written to the hidden RAM (at
// the 5-bit counter, through the address mux) or to the output RAM. These
// parts, their sizes and the counter-based addressing follow the published
// serial design; `serial_ctrl` sequences them.
//
// Interface (this design's choice):
//   weights  : while idle, `w_we` writes `w_data` at the 13-bit `w_addr`
//              = {neuron, synapse}; hidden neuron i, input j at {i, j};
//              output neuron k, hidden j at {k, OUT_BASE + j}.
//   inputs   : while `in_ready`, each `in_valid` takes one 8-bit `in_data`
//              (synapse 0 first); the N_IN-th starts the evaluation.
//   results  : `done` pulses after fan-in+2 cycles per neuron (5588 cycles
//              at the default sizes); then `word_bus` has the line of the
//              largest output high, and `out_rd_addr`/`out_rd_data` read
//              the 10 activations.
// Number formats are listed in mlp_pkg.
module mlp_serial
  import mlp_pkg::*;
#(
  parameter int unsigned N_IN_P  = N_IN,
  parameter int unsigned N_HID_P = N_HID,
  parameter int unsigned N_OUT_P = N_OUT
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [DATA_W-1:0]   in_data,
  output logic                in_ready,
  input  logic                w_we,
  input  logic [WADDR_W-1:0]  w_addr,
  input  logic [WEIGHT_W-1:0] w_data,
  input  logic [OADDR_W-1:0]  out_rd_addr,
  output logic [DATA_W-1:0]   out_rd_data,
  output logic [N_OUT_P-1:0]  word_bus,
  output logic                busy,
  output logic                done
);
  // first 8-bit count of the output layer: next multiple of 32 after N_IN
  localparam int unsigned OUT_BASE = ((N_IN_P + 31) / 32) * 32;

  logic [CNT8_W-1:0] cnt8, cnt8_ld_val;
  logic [CNT5_W-1:0] cnt5;
  logic cnt8_ld, cnt8_inc, cnt5_ld, cnt5_inc;
  logic in_we, fu_en, fu_first, layer, hid_we, out_we, out_clr;

  logic [DATA_W-1:0]   in_rdata, hid_rdata, act;
  logic [WEIGHT_W-1:0] w_rdata;
  logic [CNT5_W-1:0]   hid_addr;
  logic [WADDR_W-1:0]  w_ram_addr;
  data_t               syn;
  acc_t                acc;

  serial_ctrl #(
    .N_IN(N_IN_P), .N_HID(N_HID_P), .N_OUT(N_OUT_P),
    .CNT8_W(CNT8_W), .CNT5_W(CNT5_W), .OUT_BASE(OUT_BASE)
  ) u_ctrl (
    .clk, .rst_n, .in_valid, .cnt8, .cnt5,
    .in_we, .cnt8_ld, .cnt8_ld_val, .cnt8_inc, .cnt5_ld, .cnt5_inc,
    .fu_en, .fu_first, .layer, .hid_we, .out_we, .out_clr, .busy, .done
  );

  addr_counter #(.W(CNT8_W)) u_cnt8 (
    .clk, .rst_n, .ld(cnt8_ld), .ld_val(cnt8_ld_val), .inc(cnt8_inc), .q(cnt8)
  );

  addr_counter #(.W(CNT5_W)) u_cnt5 (
    .clk, .rst_n, .ld(cnt5_ld), .ld_val('0), .inc(cnt5_inc), .q(cnt5)
  );

  sp_ram #(.DEPTH(N_IN_P), .WIDTH(DATA_W), .ADDR_W(CNT8_W)) u_in_ram (
    .clk, .we(in_we), .addr(cnt8), .wdata(in_data), .rdata(in_rdata)
  );

  // address mux: 5-bit counter when writing, low bits of the 8-bit counter
  // when reading the hidden outputs as synaptic signals
  assign hid_addr = hid_we ? cnt5 : cnt8[CNT5_W-1:0];

  sp_ram #(.DEPTH(N_HID_P), .WIDTH(DATA_W), .ADDR_W(CNT5_W)) u_hid_ram (
    .clk, .we(hid_we), .addr(hid_addr), .wdata(act), .rdata(hid_rdata)
  );

  // weight RAM: merged counter address while busy, load port while idle
  assign w_ram_addr = busy ? {cnt5, cnt8} : w_addr;

  sp_ram #(.DEPTH(2**WADDR_W), .WIDTH(WEIGHT_W), .ADDR_W(WADDR_W)) u_w_ram (
    .clk, .we(w_we && !busy), .addr(w_ram_addr), .wdata(w_data),
    .rdata(w_rdata)
  );

  assign syn = layer ? data_t'(hid_rdata) : data_t'(in_rdata);

  functional_unit #(.DATA_W(DATA_W), .WEIGHT_W(WEIGHT_W), .ACC_W(ACC_W)) u_fu (
    .clk, .rst_n, .en(fu_en), .first(fu_first), .x(syn),
    .w(weight_t'(w_rdata)), .acc
  );

  sigmoid_lut #(.ACC_W(ACC_W), .OUT_W(DATA_W), .SUM_FRAC(SUM_FRAC),
                .LUT_AW(LUT_AW)) u_act (
    .sum(acc), .act
  );

  output_ram #(.N_OUT(N_OUT_P), .WIDTH(DATA_W), .ADDR_W(OADDR_W)) u_out_ram (
    .clk, .rst_n, .clr(out_clr), .we(out_we), .addr(cnt5[OADDR_W-1:0]),
    .wdata(act), .rd_addr(out_rd_addr), .rd_data(out_rd_data),
    .word_bus
  );

  assign in_ready = !busy;

  // the output-layer synapse range must fit the 8-bit counter
  initial assert (OUT_BASE + N_HID_P <= 2**CNT8_W && N_HID_P <= 2**CNT5_W
                  && N_OUT_P <= 2**OADDR_W);

  // loads are only accepted while idle
  always_ff @(posedge clk) begin
    if (rst_n && busy) assert (!in_valid && !w_we)
      else $error("load attempted while the MLP is busy");
  end

endmodule
