// tb_data_packer: self-checking test of the 16-to-32-bit data packer.
// Random events (1 to 40 16-bit words, odd and even lengths) are offered with
// random gaps. A reference model in the testbench pairs the words, pads odd
// events, counts lengths and applies the truncation rule using the buffer-full
// signal the testbench itself drives; every buffer write, length-queue entry
// and end-of-event pulse is compared with it. The packer must take one word
// per clock when it can, and must stall on the last word while the length
// queue is full.
module tb_data_packer;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;

  logic [15:0] in_data;
  logic        in_last, in_empty, in_rd;
  logic        fifo_wr, fifo_full, len_wr, len_full, eoe;
  logic [31:0] fifo_wdata;
  logic [16:0] len_wdata;
  int checks = 0, failures = 0, events = 0, truncs = 0, stalls = 0, odd_events = 0;

  logic [16:0] inq[$];
  // reference model state
  bit          m_have_lo = 0;
  logic [15:0] m_lo;
  int          m_len = 0;
  bit          m_trunc = 0;
  int          phase = 0;

  data_packer dut (.clk, .rst_n, .in_data, .in_last, .in_empty, .in_rd,
                   .fifo_wr, .fifo_wdata, .fifo_full, .len_wr, .len_wdata, .len_full, .eoe);

  assign in_empty = (inq.size() == 0) || gap;
  assign in_data  = (inq.size() != 0) ? inq[0][15:0] : 16'h0;
  assign in_last  = (inq.size() != 0) ? inq[0][16] : 1'b0;
  bit gap;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // stimulus
  initial begin
    gap = 0; fifo_full = 0; len_full = 0;
    for (int e = 0; e < 300; e++) begin
      int n;
      n = 1 + ($urandom % 40);
      if ((n % 2) != 0) odd_events++;
      for (int i = 0; i < n; i++) inq.push_back({(i == n - 1), 16'($urandom)});
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  // random environment, changed between clock edges
  always @(negedge clk) begin
    gap       <= ($urandom % 5) == 0;
    phase     <= phase + 1;
    fifo_full <= ((phase / 500) % 3 == 1) ? (($urandom % 3) == 0) : 1'b0;
    len_full  <= ((phase / 700) % 2 == 1) ? (($urandom % 2) == 0) : 1'b0;
  end

  // check at each clock edge against the model
  always @(posedge clk) if (rst_n) begin
    bit exp_rd;
    exp_rd = !in_empty && !(in_last && len_full);
    check(in_rd == exp_rd, "in_rd");
    if (in_last && len_full && !in_empty) stalls++;
    if (in_rd) begin
      logic [15:0] d; bit last; bit emit; logic [31:0] w;
      d = inq[0][15:0]; last = inq[0][16];
      emit = m_have_lo || last;
      w = m_have_lo ? {d, m_lo} : {16'h0, d};
      check(fifo_wr == (emit && !fifo_full), "fifo_wr");
      if (emit && !fifo_full) begin
        check(fifo_wdata == w, "fifo_wdata");
        m_len++;
      end
      if (emit && fifo_full) m_trunc = 1;
      if (!m_have_lo && !last) begin m_have_lo = 1; m_lo = d; end
      else m_have_lo = 0;
      check(len_wr == last && eoe == last, "len_wr/eoe");
      if (last) begin
        check(len_wdata == {m_trunc, 16'(m_len)}, "length entry");
        if (m_trunc) truncs++;
        events++;
        m_len = 0; m_trunc = 0;
      end
      #1 void'(inq.pop_front());   // after the design has sampled the edge
    end else begin
      check(!fifo_wr && !len_wr && !eoe, "no write without read");
    end
  end

  initial begin
    wait (rst_n);
    wait (inq.size() == 0);
    repeat (5) @(posedge clk);
    check(events == 300, "all events packed");
    check(truncs > 0, "truncation exercised");
    check(stalls > 0, "length-queue stall exercised");
    $display("events=%0d odd=%0d truncated=%0d stalls=%0d", events, odd_events, truncs, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
