// tb_rs232_if: self-checking test of the RS232 debug port.
// The testbench has its own UART (16 clocks per bit here) to send commands
// and decode replies. Checks: 'R' and 'T' give one pulse each; 'E' h l writes
// the 12-bit mask {h[3:0], l}; 'S' returns the 64-bit status word as 8 bytes,
// MSB first, with a bit time of 16 clocks; an unknown byte does nothing; 'P'
// turns spy mode on, after which sampled DAQ words come back as 4 bytes each,
// every one a word actually offered on the spy input, and 'P' again stops it.
module tb_rs232_if;
  localparam int CPB = 16;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;

  logic        rx = 1, tx, spy_valid = 0, soft_rst, sw_trig, mask_wr, spy_on;
  logic [63:0] status = 64'h0123_4567_89AB_CDEF;
  logic [31:0] spy_word = 0;
  logic [11:0] mask_data;
  int checks = 0, failures = 0, n_rst = 0, n_trig = 0, n_mask = 0;
  logic [11:0] last_mask;
  logic [7:0]  rxq[$];
  bit          offered[logic [31:0]];

  rs232_if #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .rx, .tx, .status, .spy_word, .spy_valid,
                                      .soft_rst, .sw_trig, .mask_wr, .mask_data, .spy_on);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n) begin
    n_rst  += soft_rst;
    n_trig += sw_trig;
    if (mask_wr) begin n_mask++; last_mask = mask_data; end
  end

  task automatic send(input logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rx = f[i];
      repeat (CPB) @(negedge clk);
    end
  endtask

  // receiver: waits for a start bit after reset, samples in the middle of
  // each bit; a wrong bit time would garble the decoded bytes
  initial begin
    wait (rst_n);
    repeat (5) @(posedge clk);
    forever begin
      logic [7:0] b;
      @(negedge tx);
      repeat (CPB / 2) @(posedge clk);
      check(tx == 1'b0, "start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = tx;
      end
      repeat (CPB) @(posedge clk);
      check(tx == 1'b1, "stop bit");
      rxq.push_back(b);
    end
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (10) @(negedge clk);
    send(8'h52); repeat (5) @(negedge clk);
    check(n_rst == 1 && n_trig == 0, "reset command");
    send(8'h54); repeat (5) @(negedge clk);
    check(n_trig == 1 && n_rst == 1, "trigger command");
    send(8'h45); send(8'h0A); send(8'h5C); repeat (5) @(negedge clk);
    check(n_mask == 1 && last_mask == 12'hA5C, "mask command");
    send(8'h77); repeat (5) @(negedge clk);
    check(n_rst == 1 && n_trig == 1 && n_mask == 1 && rxq.size() == 0, "unknown byte ignored");
    send(8'h53);
    repeat (12 * 10 * CPB) @(negedge clk);
    check(rxq.size() == 8, "8 status bytes");
    if (rxq.size() == 8) begin
      logic [63:0] s;
      for (int i = 0; i < 8; i++) s = {s[55:0], rxq[i]};
      check(s == status, "status word");
    end
    rxq.delete();
    // spy mode
    send(8'h50); repeat (3) @(negedge clk);
    check(spy_on, "spy on");
    for (int i = 0; i < 3000; i++) begin
      spy_valid = ($urandom % 3) == 0;
      spy_word  = $urandom;
      if (spy_valid) offered[spy_word] = 1;
      @(negedge clk);
    end
    spy_valid = 0;
    send(8'h50);
    repeat (5 * 10 * CPB) @(negedge clk);
    check(!spy_on, "spy off");
    check(rxq.size() >= 8 && rxq.size() % 4 == 0, "spy words sent as 4 bytes");
    for (int i = 0; i + 3 < rxq.size(); i += 4)
      check(offered.exists({rxq[i], rxq[i+1], rxq[i+2], rxq[i+3]}), "spied word was on the bus");
    $display("spied %0d words", rxq.size() / 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
