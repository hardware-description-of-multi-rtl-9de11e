// mlp_ref_pkg: behavioural reference for the MLP testbenches.
//
// ref_act() is the activation the RTL table is meant to realise, computed
// directly with floating point: sums (13 fraction bits) below -8.0 give 0,
// at or above +8.0 give 127, otherwise the sum is placed in a 2^-6 wide bin
// and the sigmoid of the bin centre is scaled by 128, rounded and clipped
// to 127. ref_layer() is one fully connected layer in plain integers.
package mlp_ref_pkg;

  function automatic int ref_act(longint sum);
    longint bin;
    real    x, y;
    if (sum < -65536) return 0;
    if (sum >= 65536) return 127;
    bin = (sum + 65536) / 128;
    x   = (real'(bin) + 0.5) / 64.0 - 8.0;
    y   = 128.0 / (1.0 + $exp(-x));
    if (y > 127.0) return 127;
    return int'($floor(y + 0.5));
  endfunction

  // sum of products of one neuron (signed 8-bit operands)
  function automatic longint ref_sum(const ref int w[], const ref int x[]);
    longint s = 0;
    foreach (x[j]) s += longint'(w[j]) * longint'(x[j]);
    return s;
  endfunction

endpackage
