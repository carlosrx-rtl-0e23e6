// tb_sw_trig_gen: self-checking test of the local trigger sequencer.
// A start pulse must give L0 at once, L1 L1_DELAY clocks later, the L1
// message on the next clock and L2a L2_DELAY clocks after that, each strobe
// exactly one clock long; a start while active is ignored; the sequencer can
// be restarted afterwards. Run at the default delays.
module tb_sw_trig_gen;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;
  logic start = 0, l0, l1, l1m_valid, l2a, active;
  int checks = 0, failures = 0;
  int t, t_l0[$], t_l1[$], t_l1m[$], t_l2a[$];

  sw_trig_gen dut (.clk, .rst_n, .start, .l0, .l1, .l1m_valid, .l2a, .active);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    t++;
    if (l0) t_l0.push_back(t);
    if (l1) t_l1.push_back(t);
    if (l1m_valid) t_l1m.push_back(t);
    if (l2a) t_l2a.push_back(t);
  end

  initial begin
    t = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (5) @(negedge clk);
    for (int run = 0; run < 2; run++) begin
      start = 1; @(negedge clk); start = 0;
      repeat (50) @(negedge clk);
      check(active, "active during the sequence");
      start = 1; @(negedge clk); start = 0;       // ignored
      repeat (300) @(negedge clk);
      check(!active, "inactive after L2a");
    end
    check(t_l0.size() == 2 && t_l1.size() == 2 && t_l1m.size() == 2 && t_l2a.size() == 2,
          "one strobe of each kind per run");
    for (int i = 0; i < 2 && i < t_l0.size() && i < t_l1.size() && i < t_l1m.size() && i < t_l2a.size(); i++) begin
      check(t_l1[i] - t_l0[i] == 210, "L0 to L1 delay");
      check(t_l1m[i] - t_l1[i] == 1, "L1 to message");
      check(t_l2a[i] - t_l1m[i] == 16, "message to L2a");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
