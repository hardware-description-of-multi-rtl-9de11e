// tb_functional_unit: checks the multiply-accumulate unit against an
// integer model: random operand streams with `first` restarting the sum,
// held values when `en` is low, and the 220-term worst case (all -128 x
// -128), which must fit the 23-bit accumulator without overflow.
module tb_functional_unit;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, first = 1'b0;
  logic signed [7:0]  x = '0, w = '0;
  logic signed [22:0] acc;
  int checks = 0, failures = 0;
  longint model = 0;

  functional_unit dut (.clk, .rst_n, .en, .first, .x, .w, .acc);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic e, input logic f, input int xv, input int wv);
    en = e; first = f; x = 8'(xv); w = 8'(wv);
    @(posedge clk); #1;
    if (e) model = (f ? 0 : model) + xv * wv;
    checks++;
    if (longint'(acc) != model) begin
      failures++;
      $display("mismatch: acc=%0d model=%0d", acc, model);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1; #1;
    checks++; if (acc != 0) failures++;
    // random neurons of random fan-in, with idle cycles in between
    for (int n = 0; n < 40; n++) begin
      int fan = 1 + $urandom_range(0, 219);
      for (int j = 0; j < fan; j++) begin
        step(1'b1, j == 0, $signed(8'($urandom)), $signed(8'($urandom)));
        if ($urandom_range(0, 9) == 0) step(1'b0, 1'b0, 99, 99);
      end
    end
    // worst case positive sum: 220 * 16384
    for (int j = 0; j < 220; j++) step(1'b1, j == 0, -128, -128);
    checks++; if (acc != 23'sd3604480) failures++;
    // worst case negative sum
    for (int j = 0; j < 220; j++) step(1'b1, j == 0, -128, 127);
    checks++; if (acc != -23'sd3576320) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
