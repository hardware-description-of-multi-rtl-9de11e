// tb_sp_ram: writes random words to a 220 x 8 single-port RAM, reads them
// back with the one-cycle read latency, and checks read-first behaviour
// (a write cycle returns the old word) and out-of-range addresses.
module tb_sp_ram;
  logic clk = 1'b0, we = 1'b0;
  logic [7:0] addr = '0, wdata = '0, rdata;
  logic [7:0] model [220];
  int checks = 0, failures = 0;

  sp_ram #(.DEPTH(220), .WIDTH(8), .ADDR_W(8)) dut (.clk, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 220; i++) begin
      model[i] = 8'($urandom);
      @(negedge clk); we = 1'b1; addr = 8'(i); wdata = model[i];
    end
    @(negedge clk); we = 1'b0;
    // back-to-back reads: the word of the address presented in one cycle
    // must appear after the next rising edge, while a new address is
    // already presented
    for (int r = 0; r < 600; r++) begin
      int a = $urandom_range(0, 219);
      @(negedge clk);
      addr = 8'(a);
      @(posedge clk); #1;
      addr = 8'($urandom_range(0, 219));   // next address, not yet sampled
      #1;
      checks++;
      if (rdata != model[a]) begin
        failures++; $display("addr %0d: %0h vs %0h", a, rdata, model[a]);
      end
    end
    // read-first on a write
    @(negedge clk); we = 1'b1; addr = 8'd7; wdata = ~model[7];
    @(posedge clk); #1;
    checks++; if (rdata != model[7]) failures++;
    model[7] = ~model[7];
    @(negedge clk); we = 1'b0;
    @(posedge clk); #1;
    checks++; if (rdata != model[7]) failures++;
    // out of range reads give zero, writes are dropped
    @(negedge clk); we = 1'b1; addr = 8'd230; wdata = 8'hFF;
    @(negedge clk); we = 1'b0;
    @(posedge clk); #1;
    checks++; if (rdata != 8'h00) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
