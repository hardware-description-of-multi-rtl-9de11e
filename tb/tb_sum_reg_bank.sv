// tb_sum_reg_bank: loads 24 random 23-bit sums at once, reads each back
// through the 24:1 mux, checks that the registers hold while `ld` is low
// and that a select past the last register gives zero.
module tb_sum_reg_bank;
  logic clk = 1'b0, rst_n = 1'b0, ld = 1'b0;
  logic signed [22:0] d [24];
  logic signed [22:0] model [24];
  logic [4:0] sel = '0;
  logic signed [22:0] q;
  int checks = 0, failures = 0;

  sum_reg_bank dut (.clk, .rst_n, .ld, .d, .sel, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (d[i]) d[i] = '0;
    @(negedge clk); rst_n = 1'b1;
    for (int t = 0; t < 50; t++) begin
      foreach (d[i]) begin d[i] = 23'($urandom); model[i] = d[i]; end
      @(negedge clk); ld = 1'b1;
      @(negedge clk); ld = 1'b0;
      foreach (d[i]) d[i] = 23'($urandom);   // must not be taken
      @(negedge clk);
      for (int s = 0; s < 32; s++) begin
        sel = 5'(s); #1;
        checks++;
        if (q != ((s < 24) ? model[s] : 23'sd0)) begin
          failures++; $display("sel=%0d q=%0d", s, q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
