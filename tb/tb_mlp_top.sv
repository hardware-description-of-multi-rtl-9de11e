// tb_mlp_top: end-to-end test of the whole design at its default sizes
// (220-24-10, no parameter overrides). The same random network is loaded
// into the serial and the parallel MLP (each in its own weight layout) and
// the same input vectors are fed to both at once. Every output activation
// and the one-hot output bus of both versions are compared with an integer
// forward pass using a floating-point sigmoid; the evaluation must take
// 5588 cycles in the serial version and 258 in the parallel one.
// The test also counts how often each mechanism of the two data paths
// happened and fails if one never did: the serial layer switch, hidden RAM
// writes and reads, output RAM writes; the parallel register-bank loads,
// the 24:1 mux walk, the activation broadcast to the output layer with
// units 10..23 idle; the sigmoid's lower saturation, upper saturation and
// table zone; input back-pressure while busy. The last two vectors run the
// 16- and 8-neuron networks of the scaling study on the 24-neuron hardware,
// with zero output weights on the spare hidden neurons.
module tb_mlp_top;
  import mlp_ref_pkg::*;
  localparam int NI = 220, NH = 24, NO = 10;
  localparam int NV = 5;   // input vectors evaluated

  logic clk = 1'b0, rst_n = 1'b0;
  logic s_in_valid = 1'b0, s_in_ready, s_w_we = 1'b0, s_busy, s_done;
  logic [7:0] s_in_data = '0, s_w_data = '0, s_out_rd_data;
  logic [12:0] s_w_addr = '0;
  logic [3:0] s_out_rd_addr = '0;
  logic [9:0] s_word_bus;
  logic p_in_valid = 1'b0, p_in_ready, p_w_we = 1'b0, p_busy, p_done;
  logic [7:0] p_in_data = '0, p_w_data = '0, p_out_rd_data, p_w_addr = '0;
  logic [4:0] p_w_unit = '0;
  logic [3:0] p_out_rd_addr = '0;
  logic [9:0] p_word_bus;
  int checks = 0, failures = 0;

  mlp_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- events
  int n_layer_switch, n_hid_wr, n_hid_rd, n_s_out_wr;
  int n_bank_ld, n_act_bcast, n_idle_units_ok, n_p_out_wr;
  int n_sat_lo, n_sat_hi, n_table, n_backpressure;
  bit mux_seen [NH];
  bit layer_q;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_serial.layer && !layer_q) n_layer_switch++;
    layer_q = dut.u_serial.layer;
    if (dut.u_serial.hid_we) n_hid_wr++;
    if (dut.u_serial.fu_en && dut.u_serial.layer) n_hid_rd++;
    if (dut.u_serial.out_we) n_s_out_wr++;
    if (dut.u_serial.hid_we || dut.u_serial.out_we) begin
      if (dut.u_serial.acc < -23'sd65536)      n_sat_lo++;
      else if (dut.u_serial.acc >= 23'sd65536) n_sat_hi++;
      else                                     n_table++;
    end
    if (dut.u_parallel.bank_ld) n_bank_ld++;
    if (dut.u_parallel.fu_en && dut.u_parallel.syn_act) begin
      n_act_bcast++;
      if (!dut.u_parallel.g_unit[10].u_fu.en && !dut.u_parallel.g_unit[23].u_fu.en
          && dut.u_parallel.g_unit[9].u_fu.en)
        n_idle_units_ok++;
    end
    if (dut.u_parallel.out_layer && dut.u_parallel.cnt5 < NH)
      mux_seen[dut.u_parallel.cnt5] = 1'b1;
    if (dut.u_parallel.out_we) n_p_out_wr++;
    if (s_busy && !s_in_ready) n_backpressure++;
  end

  int s_cycles, p_cycles;
  always @(posedge clk) begin
    if (s_busy && !s_done) s_cycles++;
    if (p_busy && !p_done) p_cycles++;
  end

  // ----------------------------------------------------------------- model
  int wh [NH][];
  int wo [NO][];
  int x [];
  int h [];
  int y [NO];

  task automatic gen_weights(input int hid_range);
    for (int i = 0; i < NH; i++) begin
      wh[i] = new[NI];
      foreach (wh[i][j]) wh[i][j] = $urandom_range(0, 2*hid_range - 1) - hid_range;
    end
    for (int k = 0; k < NO; k++) begin
      wo[k] = new[NH];
      foreach (wo[k][j]) wo[k][j] = $urandom_range(0, 255) - 128;
    end
  endtask

  task automatic load_weights();
    for (int i = 0; i < NH; i++)
      for (int j = 0; j < NI; j++) begin
        @(negedge clk);
        s_w_we = 1'b1; s_w_addr = 13'(i*256 + j); s_w_data = 8'(wh[i][j]);
        p_w_we = 1'b1; p_w_unit = 5'(i); p_w_addr = 8'(j); p_w_data = 8'(wh[i][j]);
      end
    for (int k = 0; k < NO; k++)
      for (int j = 0; j < NH; j++) begin
        @(negedge clk);
        s_w_we = 1'b1; s_w_addr = 13'(k*256 + 224 + j); s_w_data = 8'(wo[k][j]);
        p_w_we = 1'b1; p_w_unit = 5'(k); p_w_addr = 8'(NI + j); p_w_data = 8'(wo[k][j]);
      end
    @(negedge clk); s_w_we = 1'b0; p_w_we = 1'b0;
  endtask

  task automatic check_outputs(input string name, input int bi);
    for (int k = 0; k < NO; k++) begin
      s_out_rd_addr = 4'(k); p_out_rd_addr = 4'(k); #1;
      checks += 2;
      if (int'(s_out_rd_data) != y[k]) begin
        failures++; $display("serial output %0d = %0d, expected %0d", k, s_out_rd_data, y[k]);
      end
      if (int'(p_out_rd_data) != y[k]) begin
        failures++; $display("parallel output %0d = %0d, expected %0d", k, p_out_rd_data, y[k]);
      end
    end
    checks += 2;
    if (s_word_bus != 10'(1 << bi)) begin failures++; $display("%s: serial word bus %b", name, s_word_bus); end
    if (p_word_bus != 10'(1 << bi)) begin failures++; $display("%s: parallel word bus %b", name, p_word_bus); end
  endtask

  task automatic run_vector(input string name);
    int best, bi;
    bit s_seen, p_seen;
    x = new[NI];
    foreach (x[j]) x[j] = $urandom_range(0, 255) - 128;
    h = new[NH];
    foreach (h[i]) h[i] = ref_act(ref_sum(wh[i], x));
    best = -1; bi = 0;
    foreach (y[k]) begin
      y[k] = ref_act(ref_sum(wo[k], h));
      if (y[k] > best) begin best = y[k]; bi = k; end
    end
    for (int j = 0; j < NI; j++) begin
      @(negedge clk);
      checks += 2;
      if (!s_in_ready) failures++;
      if (!p_in_ready) failures++;
      s_in_valid = 1'b1; s_in_data = 8'(x[j]);
      p_in_valid = 1'b1; p_in_data = 8'(x[j]);
    end
    @(negedge clk); s_in_valid = 1'b0; p_in_valid = 1'b0;
    s_cycles = 0; p_cycles = 0; s_seen = 0; p_seen = 0;
    while (!(s_seen && p_seen)) begin
      if (s_done) s_seen = 1;
      if (p_done) p_seen = 1;
      @(negedge clk);
    end
    checks += 2;
    if (s_cycles != 5588) begin failures++; $display("%s: serial took %0d cycles", name, s_cycles); end
    if (p_cycles != 258) begin failures++; $display("%s: parallel took %0d cycles", name, p_cycles); end
    check_outputs(name, bi);
    $display("%s: word %0d, serial %0d cycles, parallel %0d cycles", name, bi, s_cycles, p_cycles);
  endtask

  int n_small [2] = '{16, 8};

  initial begin
    int mux_walk;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    gen_weights(20);
    load_weights();
    run_vector("vector 1");
    run_vector("vector 2");
    gen_weights(128);
    load_weights();
    run_vector("vector 3");
    // smaller networks of the scaling study on the full-size hardware: the
    // spare hidden neurons get zero output weights
    foreach (n_small[i]) begin
      gen_weights(20);
      for (int k = 0; k < NO; k++)
        for (int j = n_small[i]; j < NH; j++) wo[k][j] = 0;
      load_weights();
      run_vector($sformatf("%0d-hidden network", n_small[i]));
    end

    mux_walk = 0;
    foreach (mux_seen[i]) mux_walk += int'(mux_seen[i]);
    $display("events: layer switches %0d, hidden RAM writes %0d, hidden RAM reads %0d, serial output writes %0d",
             n_layer_switch, n_hid_wr, n_hid_rd, n_s_out_wr);
    $display("events: bank loads %0d, activation broadcasts %0d (units 10..23 idle in %0d), mux registers walked %0d, parallel output writes %0d",
             n_bank_ld, n_act_bcast, n_idle_units_ok, mux_walk, n_p_out_wr);
    $display("events: sigmoid low saturation %0d, high saturation %0d, table zone %0d, back-pressure cycles %0d",
             n_sat_lo, n_sat_hi, n_table, n_backpressure);
    checks += 12;
    if (n_layer_switch != NV) failures++;
    if (n_hid_wr != NV*NH) failures++;
    if (n_hid_rd != NV*NO*NH) failures++;
    if (n_s_out_wr != NV*NO || n_p_out_wr != NV*NO) failures++;
    if (n_bank_ld != 2*NV) failures++;
    if (n_act_bcast != NV*NH) failures++;
    if (n_idle_units_ok != n_act_bcast) failures++;
    if (mux_walk != NH) failures++;
    if (n_sat_lo == 0) failures++;
    if (n_sat_hi == 0) failures++;
    if (n_table == 0) failures++;
    if (n_backpressure == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
