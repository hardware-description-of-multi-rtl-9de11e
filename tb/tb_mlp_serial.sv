// tb_mlp_serial: end-to-end test of the serial MLP at its full 220-24-10
// size. Random weights and input vectors are generated here, loaded through
// the weight port and the input stream, and the 10 activations and the
// one-hot output bus are compared with an integer forward pass using the
// floating-point reference sigmoid. Each evaluation must take 5588 clock
// cycles. Three weight sets are used: small hidden weights (activations
// spread over the sigmoid), full-range weights (mostly saturated), and
// small weights again after a reload.
module tb_mlp_serial;
  import mlp_ref_pkg::*;
  localparam int NI = 220, NH = 24, NO = 10;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, w_we = 1'b0, busy, done;
  logic [7:0] in_data = '0, w_data = '0, out_rd_data;
  logic [12:0] w_addr = '0;
  logic [3:0] out_rd_addr = '0;
  logic [9:0] word_bus;
  int checks = 0, failures = 0;

  mlp_serial dut (.clk, .rst_n, .in_valid, .in_data, .in_ready, .w_we, .w_addr,
                  .w_data, .out_rd_addr, .out_rd_data, .word_bus, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int wh [NH][];
  int wo [NO][];
  int x [];
  int h [];
  int y [NO];

  int busy_cycles;
  always @(posedge clk) if (busy && !done) busy_cycles++;

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
        @(negedge clk); w_we = 1'b1; w_addr = 13'(i*256 + j); w_data = 8'(wh[i][j]);
      end
    for (int k = 0; k < NO; k++)
      for (int j = 0; j < NH; j++) begin
        @(negedge clk); w_we = 1'b1; w_addr = 13'(k*256 + 224 + j); w_data = 8'(wo[k][j]);
      end
    @(negedge clk); w_we = 1'b0;
  endtask

  task automatic run_vector();
    int best, bi;
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
      checks++; if (!in_ready) failures++;
      in_valid = 1'b1; in_data = 8'(x[j]);
    end
    @(negedge clk); in_valid = 1'b0;
    busy_cycles = 0;
    while (!done) @(negedge clk);
    checks++;
    if (busy_cycles != 5588) begin
      failures++; $display("evaluation took %0d cycles, expected 5588", busy_cycles);
    end
    @(negedge clk);
    for (int k = 0; k < NO; k++) begin
      out_rd_addr = 4'(k); #1;
      checks++;
      if (int'(out_rd_data) != y[k]) begin
        failures++; $display("output %0d = %0d, expected %0d", k, out_rd_data, y[k]);
      end
    end
    checks++;
    if (word_bus != 10'(1 << bi)) begin
      failures++; $display("word bus %b, expected word %0d", word_bus, bi);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    gen_weights(24);
    load_weights();
    run_vector();
    run_vector();
    gen_weights(128);
    load_weights();
    run_vector();
    gen_weights(12);
    load_weights();
    run_vector();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
