// tb_sigmoid_lut: compares the activation table with a floating-point
// sigmoid over the whole window (every bin, both bin edges), beyond both
// ends of the window and at the 23-bit extremes, and checks that the
// output never decreases as the sum grows and that f(0) = 0.5 (64).
module tb_sigmoid_lut;
  import mlp_ref_pkg::*;
  logic signed [22:0] sum;
  logic [7:0] act;
  int checks = 0, failures = 0;

  sigmoid_lut dut (.sum, .act);

  task automatic chk(input longint s);
    sum = 23'(s); #1;
    checks++;
    if (int'(act) != ref_act(s)) begin
      failures++;
      $display("sum=%0d act=%0d expected %0d", s, act, ref_act(s));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev;
    for (longint b = -65536 - 256; b < 65536 + 256; b += 128) begin
      chk(b); chk(b + 127); chk(b + 64);
    end
    chk(-4194304); chk(4194303); chk(-65537); chk(65535); chk(65536);
    for (int i = 0; i < 2000; i++) chk($signed(23'($urandom)));
    sum = 0; #1; checks++; if (act != 8'd64) failures++;
    prev = 0;
    for (longint s = -70000; s < 70000; s += 37) begin
      sum = 23'(s); #1;
      checks++;
      if (int'(act) < prev) failures++;
      prev = int'(act);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
