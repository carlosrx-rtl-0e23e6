// tb_busy_ctrl: self-checking test of the busy and back-pressure logic.
// Checks: busy follows an open trigger sequence; after an accepted event busy
// stays up until every enabled channel has reported end of event (disabled
// channels are not waited for); back-pressure rises with any almost-full flag
// and falls only when all half-full flags are low (hysteresis); almost-full of
// the descriptor queue or of an enabled channel buffer raises busy, that of a
// disabled one does not. Busy is registered: one clock of latency.
module tb_busy_ctrl;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;

  logic        seq_busy = 0, l2a_acc = 0, evq_afull = 0;
  logic [11:0] eoe = 0, ch_en = 12'hFFF, chan_afull = 0;
  logic [3:0]  ext_paf = 0, ext_hf = 0;
  logic        busy, backpressure, wait_data;
  int checks = 0, failures = 0;

  busy_ctrl dut (.clk, .rst_n, .seq_busy, .l2a_acc, .eoe, .ch_en, .ext_paf, .ext_hf, .chan_afull,
                 .evq_afull, .busy, .backpressure, .wait_data);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic tick(input int n = 1);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    tick(3); rst_n = 1; tick(2);
    check(!busy, "idle after reset");
    seq_busy = 1; tick();
    check(busy, "busy with open sequence");
    // sequence ends with an accepted event
    seq_busy = 0; l2a_acc = 1; tick(); l2a_acc = 0; tick();
    check(busy && wait_data, "busy waiting for data");
    ch_en = 12'b1111_1111_0111;                 // channel 3 disabled
    for (int c = 0; c < 12; c++) begin
      if (c == 3) continue;
      check(busy, "busy until the last enabled channel");
      eoe = 12'(1) << c; tick(); eoe = 0;
    end
    tick();
    check(!busy && !wait_data, "ready once all enabled channels delivered");
    // back-pressure hysteresis
    ext_hf = 4'b0100; tick(2);
    check(!backpressure && !busy, "half full alone does not stop");
    ext_paf = 4'b0100; tick(2);
    check(backpressure && busy, "almost full raises back-pressure");
    ext_paf = 0; tick(3);
    check(backpressure && busy, "stays while above half full");
    ext_hf = 0; tick(2);
    check(!backpressure && !busy, "released below half full");
    // buffer almost-full
    evq_afull = 1; tick(2); check(busy, "descriptor queue almost full"); evq_afull = 0; tick(2);
    chan_afull = 12'b0000_0000_1000; tick(2); check(!busy, "disabled channel ignored");
    chan_afull = 12'b0000_0001_0000; tick(2); check(busy, "enabled channel almost full");
    chan_afull = 0; tick(2); check(!busy, "idle again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
