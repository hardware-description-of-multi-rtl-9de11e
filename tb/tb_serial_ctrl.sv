// tb_serial_ctrl: runs the serial control unit with behavioural counters
// around it and checks the sequence it produces: input RAM written at
// 0..219, every synapse address {neuron, synapse} issued once in order
// (hidden layer synapses 0..219, output layer 224..247), one accumulate
// per issue a cycle later, a "first" flag per neuron, 24 hidden and 10
// output writes at the right neuron numbers, and 5588 busy cycles.
module tb_serial_ctrl;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [7:0] cnt8 = '0, cnt8_ld_val;
  logic [4:0] cnt5 = '0;
  logic in_we, cnt8_ld, cnt8_inc, cnt5_ld, cnt5_inc, fu_en, fu_first, layer;
  logic hid_we, out_we, out_clr, busy, done;
  int checks = 0, failures = 0;

  serial_ctrl dut (.clk, .rst_n, .in_valid, .cnt8, .cnt5, .in_we, .cnt8_ld,
                   .cnt8_ld_val, .cnt8_inc, .cnt5_ld, .cnt5_inc, .fu_en,
                   .fu_first, .layer, .hid_we, .out_we, .out_clr, .busy, .done);

  always #5 clk = ~clk;

  // behavioural counters
  always @(posedge clk) begin
    if (!rst_n) begin cnt8 <= '0; cnt5 <= '0; end
    else begin
      if (cnt8_ld) cnt8 <= cnt8_ld_val; else if (cnt8_inc) cnt8 <= cnt8 + 1'b1;
      if (cnt5_ld) cnt5 <= '0;          else if (cnt5_inc) cnt5 <= cnt5 + 1'b1;
    end
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected issue order
  int exp_n, exp_j, issued, accs, firsts, hw, ow, busy_cycles, prev_issue;
  bit issue_d;

  function automatic bit issuing();
    return busy && !hid_we && !out_we && cnt8_inc;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (busy) busy_cycles++;
    if (fu_en) accs++;
    if (fu_first) firsts++;
    // accumulate exactly one cycle after each issue
    if (fu_en != issue_d) begin failures++; $display("fu_en misaligned"); end
    issue_d = busy && cnt8_inc;
    if (busy && cnt8_inc) begin
      checks++;
      if (int'(cnt5) != exp_n || int'(cnt8) != exp_j) begin
        failures++;
        $display("issue {%0d,%0d}, expected {%0d,%0d}", cnt5, cnt8, exp_n, exp_j);
      end
      issued++;
      exp_j++;
      if (exp_n < 24 && issued <= 24*220 && exp_j == 220) begin
        exp_j = 0; exp_n++;
        if (exp_n == 24) begin exp_n = 0; exp_j = 224; end
      end else if (issued > 24*220 && exp_j == 248) begin
        exp_j = 224; exp_n++;
      end
    end
    if (hid_we) begin
      checks++;
      if (int'(cnt5) != hw || layer) failures++;
      hw++;
    end
    if (out_we) begin
      checks++;
      if (int'(cnt5) != ow || !layer) failures++;
      ow++;
    end
  end

  initial begin
    int t_start;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < 2; v++) begin
      exp_n = 0; exp_j = 0; issued = 0; accs = 0; firsts = 0; hw = 0; ow = 0;
      busy_cycles = 0;
      for (int i = 0; i < 220; i++) begin
        @(negedge clk); in_valid = 1'b1; #1;
        checks++;
        if (!in_we || int'(cnt8) != i || busy) begin failures++; $display("load %0d: we=%0b cnt8=%0d busy=%0b", i, in_we, cnt8, busy); end
      end
      @(negedge clk); in_valid = 1'b0;
      while (!done) @(negedge clk);
      @(negedge clk);
      checks += 6;
      if (issued != 24*220 + 10*24) begin failures++; $display("issued %0d", issued); end
      if (accs != issued) begin failures++; $display("accs %0d", accs); end
      if (firsts != 34) begin failures++; $display("firsts %0d", firsts); end
      if (hw != 24) begin failures++; $display("hidden writes %0d", hw); end
      if (ow != 10) begin failures++; $display("output writes %0d", ow); end
      if (busy_cycles != 5588 + 1) begin
        // 5588 evaluation cycles plus the one-cycle DONE state
        failures++; $display("busy cycles %0d", busy_cycles);
      end
      checks++; if (busy || cnt8 != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
