// tb_parallel_ctrl: runs the parallel control unit with behavioural
// counters and checks its phases: 220 hidden-layer issues at synapses
// 0..219, a register-bank load, 24 output-layer issues at weight addresses
// 220..243 with the mux select walking 0..23 and the activation chosen as
// synaptic signal, a second bank load, 10 output writes at 0..9, and 258
// evaluation cycles per vector.
module tb_parallel_ctrl;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [7:0] cnt8 = '0, cnt8_ld_val;
  logic [4:0] cnt5 = '0;
  logic in_we, cnt8_ld, cnt8_inc, cnt5_ld, cnt5_inc, fu_en, fu_first, syn_act;
  logic out_layer, bank_ld, out_we, out_clr, busy, done;
  int checks = 0, failures = 0;

  parallel_ctrl dut (.clk, .rst_n, .in_valid, .cnt8, .cnt5, .in_we, .cnt8_ld,
                     .cnt8_ld_val, .cnt8_inc, .cnt5_ld, .cnt5_inc, .fu_en,
                     .fu_first, .syn_act, .out_layer, .bank_ld, .out_we,
                     .out_clr, .busy, .done);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (!rst_n) begin cnt8 <= '0; cnt5 <= '0; end
    else begin
      if (cnt8_ld) cnt8 <= cnt8_ld_val; else if (cnt8_inc) cnt8 <= cnt8 + 1'b1;
      if (cnt5_ld) cnt5 <= '0;          else if (cnt5_inc) cnt5 <= cnt5 + 1'b1;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hi, oi, accs, firsts, acts, banks, ow, busy_cycles;
  bit issue_d, act_d;

  always @(posedge clk) if (rst_n) begin
    if (busy) busy_cycles++;
    if (fu_en) accs++;
    if (fu_first) firsts++;
    if (syn_act) acts++;
    if (fu_en != issue_d || syn_act != act_d) begin
      failures++; $display("pipeline strobes misaligned");
    end
    issue_d = busy && cnt8_inc;
    act_d   = busy && cnt8_inc && cnt5_inc;
    if (busy && cnt8_inc && !cnt5_inc) begin      // hidden-layer issue
      checks++;
      if (int'(cnt8) != hi || banks != 0) failures++;
      hi++;
    end
    if (busy && cnt8_inc && cnt5_inc) begin       // output-layer issue
      checks++;
      if (int'(cnt8) != 220 + oi || int'(cnt5) != oi || banks != 1 || !out_layer)
        failures++;
      oi++;
    end
    if (bank_ld) banks++;
    if (out_we) begin
      checks++;
      if (int'(cnt5) != ow || banks != 2) failures++;
      ow++;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < 3; v++) begin
      hi = 0; oi = 0; accs = 0; firsts = 0; acts = 0; banks = 0; ow = 0;
      busy_cycles = 0;
      for (int i = 0; i < 220; i++) begin
        @(negedge clk); in_valid = 1'b1; #1;
        checks++;
        if (!in_we || int'(cnt8) != i || busy) begin failures++; $display("load %0d: we=%0b cnt8=%0d busy=%0b", i, in_we, cnt8, busy); end
      end
      @(negedge clk); in_valid = 1'b0;
      while (!done) @(negedge clk);
      @(negedge clk);
      checks += 7;
      if (hi != 220) begin failures++; $display("hidden issues %0d", hi); end
      if (oi != 24) begin failures++; $display("output issues %0d", oi); end
      if (accs != 244 || acts != 24) begin failures++; $display("accs %0d acts %0d", accs, acts); end
      if (firsts != 2) begin failures++; $display("firsts %0d", firsts); end
      if (banks != 2) begin failures++; $display("bank loads %0d", banks); end
      if (ow != 10) begin failures++; $display("output writes %0d", ow); end
      if (busy_cycles != 258 + 1) begin failures++; $display("busy cycles %0d", busy_cycles); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
