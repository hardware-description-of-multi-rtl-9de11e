// mlp_parallel: node-parallel register-transfer-level MLP (220 inputs, 24
// hidden, 10 outputs) with one functional unit per hidden neuron.
//
// All 24 functional units work at once on the hidden layer: the 8-bit
// counter addresses the input RAM and 24 private weight RAMs together, so
// each unit receives the same synaptic signal and its own weight every
// cycle. Their 23-bit sums are saved in 24 registers, and a 24:1 mux
// selected by the 5-bit counter feeds them one by one to the single
// activation unit. Each activation is broadcast as the synaptic signal of
// units 0..9, which compute the output layer with weights stored after the
// 220 input weights in their RAMs (those RAMs hold 220+24 words, the others
// 220). The 10 output sums then pass through the activation unit into the
// output RAM. The structure follows the published parallel design;
// `parallel_ctrl` sequences it (258 cycles per vector at default sizes).
//
// Interface (this design's choice):
//   weights  : while idle, `w_we` writes `w_data` into the RAM of unit
//              `w_unit` at `w_addr`: input weights at 0..N_IN-1, output
//              neuron k's weight of hidden neuron j at N_IN+j in RAM k.
//   inputs   : while `in_ready`, each `in_valid` takes one `in_data`; the
//              N_IN-th starts the evaluation.
//   results  : as in mlp_serial (`done`, `word_bus`, `out_rd_*`).
// Number formats are listed in mlp_pkg.
module mlp_parallel
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
  input  logic [CNT5_W-1:0]   w_unit,
  input  logic [CNT8_W-1:0]   w_addr,
  input  logic [WEIGHT_W-1:0] w_data,
  input  logic [OADDR_W-1:0]  out_rd_addr,
  output logic [DATA_W-1:0]   out_rd_data,
  output logic [N_OUT_P-1:0]  word_bus,
  output logic                busy,
  output logic                done
);
  logic [CNT8_W-1:0] cnt8, cnt8_ld_val;
  logic [CNT5_W-1:0] cnt5;
  logic cnt8_ld, cnt8_inc, cnt5_ld, cnt5_inc;
  logic in_we, fu_en, fu_first, syn_act, out_layer, bank_ld, out_we, out_clr;

  logic [DATA_W-1:0] in_rdata, act, act_q;
  logic [CNT8_W-1:0] w_ram_addr;
  data_t             syn;
  acc_t              acc  [N_HID_P];
  acc_t              bank_q;

  parallel_ctrl #(
    .N_IN(N_IN_P), .N_HID(N_HID_P), .N_OUT(N_OUT_P),
    .CNT8_W(CNT8_W), .CNT5_W(CNT5_W)
  ) u_ctrl (
    .clk, .rst_n, .in_valid, .cnt8, .cnt5,
    .in_we, .cnt8_ld, .cnt8_ld_val, .cnt8_inc, .cnt5_ld, .cnt5_inc,
    .fu_en, .fu_first, .syn_act, .out_layer, .bank_ld, .out_we, .out_clr,
    .busy, .done
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

  // synaptic signal mux: input RAM (hidden layer) or registered activation
  // (output layer)
  always_ff @(posedge clk) begin
    if (!rst_n) act_q <= '0;
    else        act_q <= act;
  end

  assign syn        = syn_act ? data_t'(act_q) : data_t'(in_rdata);
  assign w_ram_addr = busy ? cnt8 : w_addr;

  for (genvar k = 0; k < N_HID_P; k++) begin : g_unit
    localparam int unsigned DEPTH = (k < N_OUT_P) ? N_IN_P + N_HID_P : N_IN_P;
    logic [WEIGHT_W-1:0] w_rdata;

    sp_ram #(.DEPTH(DEPTH), .WIDTH(WEIGHT_W), .ADDR_W(CNT8_W)) u_w_ram (
      .clk, .we(w_we && !busy && w_unit == CNT5_W'(k)), .addr(w_ram_addr),
      .wdata(w_data), .rdata(w_rdata)
    );

    functional_unit #(.DATA_W(DATA_W), .WEIGHT_W(WEIGHT_W), .ACC_W(ACC_W))
    u_fu (
      .clk, .rst_n, .en(fu_en && (!out_layer || k < N_OUT_P)),
      .first(fu_first), .x(syn), .w(weight_t'(w_rdata)), .acc(acc[k])
    );
  end

  sum_reg_bank #(.N(N_HID_P), .ACC_W(ACC_W), .SEL_W(CNT5_W)) u_bank (
    .clk, .rst_n, .ld(bank_ld), .d(acc), .sel(cnt5), .q(bank_q)
  );

  sigmoid_lut #(.ACC_W(ACC_W), .OUT_W(DATA_W), .SUM_FRAC(SUM_FRAC),
                .LUT_AW(LUT_AW)) u_act (
    .sum(bank_q), .act
  );

  output_ram #(.N_OUT(N_OUT_P), .WIDTH(DATA_W), .ADDR_W(OADDR_W)) u_out_ram (
    .clk, .rst_n, .clr(out_clr), .we(out_we), .addr(cnt5[OADDR_W-1:0]),
    .wdata(act), .rd_addr(out_rd_addr), .rd_data(out_rd_data),
    .word_bus
  );

  assign in_ready = !busy;

  initial assert (N_IN_P + N_HID_P <= 2**CNT8_W && N_HID_P <= 2**CNT5_W
                  && N_OUT_P <= N_HID_P && N_OUT_P <= 2**OADDR_W);

  always_ff @(posedge clk) begin
    if (rst_n && busy) assert (!in_valid && !w_we)
      else $error("load attempted while the MLP is busy");
  end

endmodule
