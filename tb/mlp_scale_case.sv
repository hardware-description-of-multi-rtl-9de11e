// mlp_scale_case: one point of the hidden-layer scaling test. It builds a
// serial and (when NH >= 10) a parallel MLP with NH hidden neurons (220 inputs, 10
// outputs), loads one random network into both, evaluates two random input
// vectors, and compares all outputs with an integer forward pass. Expected
// cycles per vector: serial NH*(220+2) + 10*(NH+2), parallel
// (220+2) + (NH+2) + 10. Results are returned on the ports.
module mlp_scale_case #(
  parameter int NH = 8
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);
  import mlp_ref_pkg::*;
  localparam int NI = 220, NO = 10;

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

  mlp_serial #(.N_HID_P(NH)) u_s (
    .clk, .rst_n, .in_valid(s_in_valid), .in_data(s_in_data), .in_ready(s_in_ready),
    .w_we(s_w_we), .w_addr(s_w_addr), .w_data(s_w_data), .out_rd_addr(s_out_rd_addr),
    .out_rd_data(s_out_rd_data), .word_bus(s_word_bus), .busy(s_busy), .done(s_done));

  // the parallel version computes the output layer on units 0..9, so it
  // needs at least as many hidden units as outputs
  localparam bit PAR = (NH >= NO);

  if (PAR) begin : g_par
    mlp_parallel #(.N_HID_P(NH)) u_p (
      .clk, .rst_n, .in_valid(p_in_valid), .in_data(p_in_data), .in_ready(p_in_ready),
      .w_we(p_w_we), .w_unit(p_w_unit), .w_addr(p_w_addr), .w_data(p_w_data),
      .out_rd_addr(p_out_rd_addr), .out_rd_data(p_out_rd_data), .word_bus(p_word_bus),
      .busy(p_busy), .done(p_done));
  end else begin : g_no_par
    assign p_in_ready = 1'b1;
    assign p_out_rd_data = '0;
    assign p_word_bus = '0;
    assign p_busy = 1'b0;
    assign p_done = 1'b1;
  end

  int s_cycles, p_cycles;
  always @(posedge clk) begin
    if (s_busy && !s_done) s_cycles++;
    if (p_busy && !p_done) p_cycles++;
  end

  int wh [NH][];
  int wo [NO][];
  int x [];
  int h [];
  int y [NO];

  initial begin
    finished = 1'b0; checks = 0; failures = 0;
    @(posedge rst_n);
    for (int i = 0; i < NH; i++) begin
      wh[i] = new[NI];
      foreach (wh[i][j]) wh[i][j] = $urandom_range(0, 47) - 24;
    end
    for (int k = 0; k < NO; k++) begin
      wo[k] = new[NH];
      foreach (wo[k][j]) wo[k][j] = $urandom_range(0, 255) - 128;
    end
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
    for (int v = 0; v < 2; v++) begin
      bit s_seen, p_seen;
      x = new[NI];
      foreach (x[j]) x[j] = $urandom_range(0, 255) - 128;
      h = new[NH];
      foreach (h[i]) h[i] = ref_act(ref_sum(wh[i], x));
      foreach (y[k]) y[k] = ref_act(ref_sum(wo[k], h));
      for (int j = 0; j < NI; j++) begin
        @(negedge clk);
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
      checks += 1 + int'(PAR);
      if (s_cycles != NH*(NI+2) + NO*(NH+2)) begin
        failures++; $display("NH=%0d: serial took %0d cycles", NH, s_cycles);
      end
      if (PAR && p_cycles != (NI+2) + (NH+2) + NO) begin
        failures++; $display("NH=%0d: parallel took %0d cycles", NH, p_cycles);
      end
      for (int k = 0; k < NO; k++) begin
        s_out_rd_addr = 4'(k); p_out_rd_addr = 4'(k); #1;
        checks += 1 + int'(PAR);
        if (int'(s_out_rd_data) != y[k]) failures++;
        if (PAR && int'(p_out_rd_data) != y[k]) failures++;
      end
      $display("NH=%0d vector %0d: serial %0d cycles, parallel %0d cycles",
               NH, v, s_cycles, p_cycles);
    end
    finished = 1'b1;
  end
endmodule
