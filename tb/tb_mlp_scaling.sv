// tb_mlp_scaling: runs the hidden-layer scaling points that fit the
// design's counters (8, 16 and 32 hidden neurons; 64 and 128 would need a
// wider neuron counter) with both the serial and the parallel MLP, and
// checks outputs and cycle counts at each size. The parallel version
// needs at least 10 hidden units (one per output neuron), so the 8-neuron
// point runs the serial version only.
module tb_mlp_scaling;
  logic clk = 1'b0, rst_n = 1'b0;
  logic fin [3];
  int ch [3];
  int fl [3];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mlp_scale_case #(.NH(8))  c8  (.clk, .rst_n, .finished(fin[0]), .checks(ch[0]), .failures(fl[0]));
  mlp_scale_case #(.NH(16)) c16 (.clk, .rst_n, .finished(fin[1]), .checks(ch[1]), .failures(fl[1]));
  mlp_scale_case #(.NH(32)) c32 (.clk, .rst_n, .finished(fin[2]), .checks(ch[2]), .failures(fl[2]));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (fin[0] && fin[1] && fin[2]);
    for (int i = 0; i < 3; i++) begin
      checks += ch[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
