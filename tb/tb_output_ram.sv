// tb_output_ram: writes sets of 10 activations, reads them back through the
// host port and checks that the output bus marks the largest one (the
// first on a tie), that it is empty after clear, and that it follows the
// writes as they arrive.
module tb_output_ram;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, we = 1'b0;
  logic [3:0] addr = '0, rd_addr = '0;
  logic [7:0] wdata = '0, rd_data;
  logic [9:0] word_bus;
  int checks = 0, failures = 0;

  output_ram dut (.clk, .rst_n, .clr, .we, .addr, .wdata, .rd_addr, .rd_data, .word_bus);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v [10];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      int best, bi;
      @(negedge clk); clr = 1'b1;
      @(negedge clk); clr = 1'b0;
      checks++; if (word_bus != '0) failures++;
      best = -1000; bi = 0;
      for (int k = 0; k < 10; k++) begin
        v[k] = (t % 4 == 0) ? $urandom_range(0, 3) : $urandom_range(0, 127);
        if (v[k] > best) begin best = v[k]; bi = k; end
        we = 1'b1; addr = 4'(k); wdata = 8'(v[k]);
        @(negedge clk);
        checks++;
        if (word_bus != 10'(1 << bi)) begin
          failures++; $display("t=%0d k=%0d bus=%b exp idx %0d", t, k, word_bus, bi);
        end
      end
      we = 1'b0;
      for (int k = 0; k < 10; k++) begin
        rd_addr = 4'(k); #1;
        checks++; if (int'(rd_data) != v[k]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
