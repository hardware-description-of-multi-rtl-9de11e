// mlp_pkg: sizes and number formats shared by the 220-24-10 multi-layer
// perceptron datapaths (serial and node-parallel versions).
//
// Network shape (220 inputs = 10 speech frames x 22 features, 24 hidden
// neurons, 10 output words) and the word widths (8-bit synaptic signals and
// weights, 16-bit products, 23-bit accumulators, 8-bit and 5-bit address
// counters, 13-bit serial weight address) follow the published design.
//
// The binary-point positions are this design's own choice:
//   synaptic signal / activation output : signed Q1.7  (7 fraction bits)
//   weight                              : signed Q2.6  (6 fraction bits)
//   product                             : signed Q3.13 (13 fraction bits)
//   accumulated sum                     : signed Q10.13
// With these, the non-saturated part of the sigmoid (|sum| < ~5.5) covers
// about 1 % of the 2^23 sum codes.
package mlp_pkg;

  localparam int unsigned N_IN     = 220;  // input-layer synaptic signals
  localparam int unsigned N_HID    = 24;   // hidden neurons
  localparam int unsigned N_OUT    = 10;   // output neurons (words 0..9)

  localparam int unsigned DATA_W   = 8;    // synaptic signal / activation
  localparam int unsigned WEIGHT_W = 8;    // weight
  localparam int unsigned ACC_W    = 23;   // accumulator

  localparam int unsigned CNT8_W   = 8;    // synapse (read) counter
  localparam int unsigned CNT5_W   = 5;    // neuron (write) counter
  localparam int unsigned WADDR_W  = CNT5_W + CNT8_W;  // 13
  localparam int unsigned OADDR_W  = 4;    // output RAM address

  localparam int unsigned SUM_FRAC = 13;   // fraction bits of the sum
  localparam int unsigned LUT_AW   = 10;   // sigmoid table address bits

  typedef logic signed [DATA_W-1:0]   data_t;
  typedef logic signed [WEIGHT_W-1:0] weight_t;
  typedef logic signed [ACC_W-1:0]    acc_t;

endpackage
