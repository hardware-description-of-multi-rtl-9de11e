// tb_addr_counter: random increment / load / reset stimulus on an 8-bit
// and a 5-bit counter, compared every cycle with an integer model,
// including wrap-around.
module tb_addr_counter;
  logic clk = 1'b0, rst_n = 1'b0, ld = 1'b0, inc = 1'b0;
  logic [7:0] ld_val = '0, q8;
  logic [4:0] q5;
  int checks = 0, failures = 0;
  int m8 = 0, m5 = 0;

  addr_counter #(.W(8)) u8 (.clk, .rst_n, .ld, .ld_val, .inc, .q(q8));
  addr_counter #(.W(5)) u5 (.clk, .rst_n, .ld, .ld_val(ld_val[4:0]), .inc, .q(q5));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      rst_n  = ($urandom_range(0, 199) != 0);
      ld     = ($urandom_range(0, 29) == 0);
      inc    = ($urandom_range(0, 3) != 0);
      ld_val = 8'($urandom);
      @(posedge clk);
      if (!rst_n)   begin m8 = 0; m5 = 0; end
      else if (ld)  begin m8 = ld_val; m5 = ld_val % 32; end
      else if (inc) begin m8 = (m8 + 1) % 256; m5 = (m5 + 1) % 32; end
      #1;
      checks++;
      if (int'(q8) != m8 || int'(q5) != m5) begin
        failures++; $display("q8=%0d/%0d q5=%0d/%0d", q8, m8, q5, m5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
