// serial_ctrl: finite-state control unit of the serial MLP datapath.
//
// It sequences one functional unit over all 34 neurons. While IDLE it takes
// the input vector: each `in_valid` writes the input RAM at the 8-bit
// counter and advances it; the N_IN-th word starts the evaluation. For each
// neuron, the MAC state issues one synapse address per cycle (8-bit counter,
// weight address {5-bit counter, 8-bit counter}); read data come back one
// cycle later, so the functional-unit enable and "first product" flag are
// the issue strobes delayed by one register. FLUSH lets the last product
// enter the accumulator, and WRITE stores the activation in the hidden RAM
// (hidden layer) or the output RAM (output layer) at the 5-bit counter.
// Each neuron therefore takes fan-in + 2 cycles: 24*(220+2) + 10*(24+2) =
// 5588 cycles per vector, the cycle count reported for the serial design.
// The hidden layer runs the 8-bit counter over 0..N_IN-1, the output layer
// over OUT_BASE..OUT_BASE+N_HID-1 so that its low 5 bits address the hidden
// RAM and the 13-bit weight addresses of the two layers never overlap.
// `done` is high for one cycle after the last output is written.
// The published design states only that the control unit is an FSM; the
// states, the one-cycle read latency and the counter ranges are this
// design's choices.
module serial_ctrl #(
  parameter int unsigned N_IN     = 220,
  parameter int unsigned N_HID    = 24,
  parameter int unsigned N_OUT    = 10,
  parameter int unsigned CNT8_W   = 8,
  parameter int unsigned CNT5_W   = 5,
  parameter int unsigned OUT_BASE = 224
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [CNT8_W-1:0] cnt8,
  input  logic [CNT5_W-1:0] cnt5,
  output logic              in_we,
  output logic              cnt8_ld,
  output logic [CNT8_W-1:0] cnt8_ld_val,
  output logic              cnt8_inc,
  output logic              cnt5_ld,
  output logic              cnt5_inc,
  output logic              fu_en,
  output logic              fu_first,
  output logic              layer,      // 0: hidden, 1: output
  output logic              hid_we,
  output logic              out_we,
  output logic              out_clr,
  output logic              busy,
  output logic              done
);
  typedef enum logic [2:0] {IDLE, MAC, FLUSH, WRITE, DONE} state_t;

  state_t state, state_n;
  logic   layer_n;
  logic   issue, issue_first;
  logic   last_syn;

  localparam logic [CNT8_W-1:0] HID_FIRST = '0;
  localparam logic [CNT8_W-1:0] HID_LAST  = CNT8_W'(N_IN - 1);
  localparam logic [CNT8_W-1:0] OUT_FIRST = CNT8_W'(OUT_BASE);
  localparam logic [CNT8_W-1:0] OUT_LAST  = CNT8_W'(OUT_BASE + N_HID - 1);

  assign last_syn = (cnt8 == (layer ? OUT_LAST : HID_LAST));

  always_comb begin
    state_n     = state;
    layer_n     = layer;
    in_we       = 1'b0;
    cnt8_ld     = 1'b0;
    cnt8_ld_val = HID_FIRST;
    cnt8_inc    = 1'b0;
    cnt5_ld     = 1'b0;
    cnt5_inc    = 1'b0;
    hid_we      = 1'b0;
    out_we      = 1'b0;
    out_clr     = 1'b0;
    issue       = 1'b0;
    issue_first = 1'b0;
    unique case (state)
      IDLE: if (in_valid) begin
        in_we = 1'b1;
        if (cnt8 == HID_LAST) begin
          cnt8_ld = 1'b1;              // restart at the first synapse
          cnt5_ld = 1'b1;              // first hidden neuron
          out_clr = 1'b1;
          layer_n = 1'b0;
          state_n = MAC;
        end else begin
          cnt8_inc = 1'b1;
        end
      end
      MAC: begin
        issue       = 1'b1;
        issue_first = (cnt8 == (layer ? OUT_FIRST : HID_FIRST));
        cnt8_inc    = 1'b1;
        if (last_syn) state_n = FLUSH;
      end
      FLUSH: state_n = WRITE;
      WRITE: begin
        if (!layer) begin
          hid_we = 1'b1;
          if (cnt5 == CNT5_W'(N_HID - 1)) begin
            layer_n     = 1'b1;
            cnt5_ld     = 1'b1;
            cnt8_ld     = 1'b1;
            cnt8_ld_val = OUT_FIRST;
          end else begin
            cnt5_inc    = 1'b1;
            cnt8_ld     = 1'b1;
            cnt8_ld_val = HID_FIRST;
          end
          state_n = MAC;
        end else begin
          out_we = 1'b1;
          if (cnt5 == CNT5_W'(N_OUT - 1)) begin
            cnt8_ld     = 1'b1;        // ready to load the next vector
            cnt8_ld_val = HID_FIRST;
            state_n     = DONE;
          end else begin
            cnt5_inc    = 1'b1;
            cnt8_ld     = 1'b1;
            cnt8_ld_val = OUT_FIRST;
            state_n     = MAC;
          end
        end
      end
      DONE: state_n = IDLE;
      default: state_n = IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= IDLE;
      layer    <= 1'b0;
      fu_en    <= 1'b0;
      fu_first <= 1'b0;
    end else begin
      state    <= state_n;
      layer    <= layer_n;
      fu_en    <= issue;               // data of an issued address arrive now
      fu_first <= issue_first;
    end
  end

  assign busy = (state != IDLE);
  assign done = (state == DONE);

endmodule
