// tb_xcvr_ctrl: self-checking test of the link-enable control.
// After reset all links are enabled and no transmitter disabled. A new mask
// written while the readout is busy stays pending and is applied on the first
// quiet clock; the transmit disables are the inverse of the applied mask.
module tb_xcvr_ctrl;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;
  logic        wr = 0, quiet = 0, pending;
  logic [11:0] wdata = 0, ch_en, xcvr_disable;
  int checks = 0, failures = 0;

  xcvr_ctrl dut (.clk, .rst_n, .wr, .wdata, .quiet, .ch_en, .xcvr_disable, .pending);

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
    tick(3); rst_n = 1; tick();
    check(ch_en == 12'hFFF && xcvr_disable == 12'h000 && !pending, "reset state");
    for (int k = 0; k < 20; k++) begin
      logic [11:0] m, prev_mask;
      m = 12'($urandom); prev_mask = ch_en;
      wr = 1; wdata = m; tick(); wr = 0;
      check(pending, "pending after write");
      tick(1 + $urandom % 5);
      check(ch_en == prev_mask, "not applied while busy");
      quiet = 1; tick(); quiet = 0;
      check(ch_en == m && xcvr_disable == ~m && !pending, "applied when quiet");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
