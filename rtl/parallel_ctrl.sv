// parallel_ctrl: finite-state control unit of the node-parallel MLP.
//
// While IDLE it takes the input vector exactly as the serial version does.
// Evaluation then runs in three phases:
//   hidden MAC  : the 8-bit counter issues synapses 0..N_IN-1 to the input
//                 RAM and all N_HID weight RAMs; every functional unit
//                 accumulates one product per cycle (HMAC, HFLUSH), then all
//                 sums are saved into the register bank in one cycle (HSAVE).
//   output MAC  : the 5-bit counter walks the saved hidden sums through the
//                 24:1 mux and the activation unit; each activation is
//                 registered and broadcast as the synaptic signal of the
//                 first N_OUT functional units, whose weights sit at
//                 addresses N_IN..N_IN+N_HID-1 of their RAMs (OMAC, OFLUSH),
//                 then the output sums are saved (OSAVE).
//   write-back  : the 5-bit counter walks the N_OUT output sums through the
//                 activation unit into the output RAM (OWRITE).
// Cycles per vector: (N_IN+2) + (N_HID+2) + N_OUT = 258 at 220-24-10.
// Memory reads have one cycle of latency, so `fu_en`, `fu_first` and
// `syn_act` are the issue strobes delayed by one register. `done` is high
// for one cycle at the end.
// The phase structure follows the published data path (register bank,
// single activation unit behind a 24:1 mux feeding the output layer); the
// states and their timing are this design's choices. The published design
// reports 278 cycles for its own control unit, whose states are not given.
module parallel_ctrl #(
  parameter int unsigned N_IN   = 220,
  parameter int unsigned N_HID  = 24,
  parameter int unsigned N_OUT  = 10,
  parameter int unsigned CNT8_W = 8,
  parameter int unsigned CNT5_W = 5
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
  output logic              syn_act,    // synapse = activation (output layer)
  output logic              out_layer,  // only the first N_OUT units work
  output logic              bank_ld,
  output logic              out_we,
  output logic              out_clr,
  output logic              busy,
  output logic              done
);
  typedef enum logic [3:0] {
    IDLE, HMAC, HFLUSH, HSAVE, OMAC, OFLUSH, OSAVE, OWRITE, DONE
  } state_t;

  state_t state, state_n;
  logic   issue, issue_first, issue_act;

  localparam logic [CNT8_W-1:0] IN_LAST = CNT8_W'(N_IN - 1);

  always_comb begin
    state_n     = state;
    in_we       = 1'b0;
    cnt8_ld     = 1'b0;
    cnt8_ld_val = '0;
    cnt8_inc    = 1'b0;
    cnt5_ld     = 1'b0;
    cnt5_inc    = 1'b0;
    bank_ld     = 1'b0;
    out_we      = 1'b0;
    out_clr     = 1'b0;
    issue       = 1'b0;
    issue_first = 1'b0;
    issue_act   = 1'b0;
    unique case (state)
      IDLE: if (in_valid) begin
        in_we = 1'b1;
        if (cnt8 == IN_LAST) begin
          cnt8_ld = 1'b1;
          out_clr = 1'b1;
          state_n = HMAC;
        end else begin
          cnt8_inc = 1'b1;
        end
      end
      HMAC: begin
        issue       = 1'b1;
        issue_first = (cnt8 == '0);
        cnt8_inc    = 1'b1;
        if (cnt8 == IN_LAST) state_n = HFLUSH;
      end
      HFLUSH: state_n = HSAVE;
      HSAVE: begin
        bank_ld     = 1'b1;
        cnt5_ld     = 1'b1;               // select Reg. 0
        cnt8_ld     = 1'b1;
        cnt8_ld_val = CNT8_W'(N_IN);      // first output-layer weight
        state_n     = OMAC;
      end
      OMAC: begin
        issue       = 1'b1;
        issue_act   = 1'b1;
        issue_first = (cnt5 == '0);
        cnt5_inc    = 1'b1;
        cnt8_inc    = 1'b1;
        if (cnt5 == CNT5_W'(N_HID - 1)) state_n = OFLUSH;
      end
      OFLUSH: state_n = OSAVE;
      OSAVE: begin
        bank_ld = 1'b1;
        cnt5_ld = 1'b1;
        cnt8_ld = 1'b1;                   // ready to load the next vector
        state_n = OWRITE;
      end
      OWRITE: begin
        out_we   = 1'b1;
        cnt5_inc = 1'b1;
        if (cnt5 == CNT5_W'(N_OUT - 1)) state_n = DONE;
      end
      DONE: state_n = IDLE;
      default: state_n = IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= IDLE;
      fu_en    <= 1'b0;
      fu_first <= 1'b0;
      syn_act  <= 1'b0;
    end else begin
      state    <= state_n;
      fu_en    <= issue;
      fu_first <= issue_first;
      syn_act  <= issue_act;
    end
  end

  // the output layer lasts from OMAC until its sums are saved
  assign out_layer = (state == OMAC) || (state == OFLUSH) || (state == OSAVE);
  assign busy      = (state != IDLE);
  assign done      = (state == DONE);

endmodule
