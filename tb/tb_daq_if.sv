// tb_daq_if: self-checking test of the event builder.
// The trigger descriptor queue and the four external FIFOs are modelled by
// queues. Links 0, 4 and 10 are disabled. For 40 descriptors (every fifth a
// dummy with error bits) the testbench loads the fragments of the enabled
// links, builds the expected DAQ stream itself (CDH words from the header
// table, then the fragments in link order) and compares every word, start and
// end mark, with the SIU's ready toggling at random. The last 10 events run
// with ready held high and must go out at one word per clock, disabled links
// skipped without an idle clock. Finally a fragment header with the wrong
// link number must set frag_err.
module tb_daq_if;
  import carlosrx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;

  localparam logic [11:0] EN = 12'b1011_1110_1110;
  localparam int NEV = 40;

  logic             desc_rd, ddl_valid, ddl_sof, ddl_eof, ddl_ready, frag_err, idle, ovf_seen;
  logic [3:0]       ext_ef, ext_ren;
  logic [3:0][31:0] ext_rdata;
  logic [31:0]      ddl_data;
  logic [15:0]      events_sent;
  logic [11:0]      bc_now = 12'h321;
  trig_desc_t       dq[$];
  trig_desc_t       desc_head;
  logic [31:0]      xq[4][$];
  logic [33:0]      expq[$];   // {sof, eof, word}
  int checks = 0, failures = 0, nwords = 0, ev_done = 0, fullrate_bad = 0;
  bit full_rate = 0, corrupt_phase = 0;
  int words_in_ev;

  daq_if dut (.clk, .rst_n, .desc_empty(dq.size() == 0), .desc(desc_head), .desc_rd, .ch_en(EN),
              .bc_now, .ovf_seen, .ext_ef, .ext_rdata, .ext_ren, .ddl_data, .ddl_valid, .ddl_sof,
              .ddl_eof, .ddl_ready, .frag_err, .idle, .events_sent);

  assign desc_head = (dq.size() != 0) ? dq[0] : '0;
  for (genvar f = 0; f < 4; f++) begin : g_x
    assign ext_ef[f]    = xq[f].size() == 0;
    assign ext_rdata[f] = (xq[f].size() != 0) ? xq[f][0] : 32'h0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    $display("timeout: %0d words left, %0d events done state=%0d ch=%0d ef=%b dq=%0d exp=%h", expq.size(), ev_done, dut.state, dut.ch, ext_ef, dq.size(), expq[0]);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // expected header, written out field by field from the CDH table
  task automatic push_cdh(input trig_desc_t d, input bit last);
    logic [31:0] w[8];
    w[0] = 32'hFFFFFFFF;
    w[1] = 0; w[1][31:24] = 8'h02; w[1][23:14] = d.l1msg; w[1][11:0] = d.bc;
    w[2] = 0; w[2][23:0] = d.orbit;
    w[3] = 0; w[3][23:0] = 24'h000002;
    w[4] = 0; w[4][11:0] = bc_now; w[4][12] = d.err.l0err; w[4][13] = d.err.l1err;
    w[4][14] = d.err.l1merr; w[4][15] = d.err.l2err; w[4][16] = d.dummy; w[4][17] = ovf_seen;
    w[5] = d.classes[31:0];
    w[6] = 0; w[6][17:0] = d.classes[49:32]; w[6][31:28] = d.roi[3:0];
    w[7] = d.roi[35:4];
    for (int i = 0; i < 8; i++) expq.push_back({(i == 0), (last && i == 7), w[i]});
  endtask

  task automatic load_event(input bit dummy, input int k);
    trig_desc_t d;
    d = '0;
    d.dummy = dummy; d.bc = 12'($urandom); d.orbit = 24'($urandom); d.l1msg = 10'($urandom);
    if (dummy) d.err = trig_err_t'(4'(1 << (k % 4)));
    else begin d.classes = {18'($urandom), 32'($urandom)}; d.roi = {4'($urandom), 32'($urandom)}; end
    push_cdh(d, dummy);
    if (!dummy) begin
      for (int c = 0; c < 12; c++) if (EN[c]) begin
        int len;
        bit lastc;
        len = ($urandom % 4 == 0) ? 0 : 1 + $urandom % 25;
        lastc = (c == 11);
        xq[c / 3].push_back(frag_header(4'(c), 4'(k), 1'b0, 16'(len)));
        expq.push_back({1'b0, lastc && len == 0, frag_header(4'(c), 4'(k), 1'b0, 16'(len))});
        for (int i = 0; i < len; i++) begin
          logic [31:0] w;
          w = $urandom;
          xq[c / 3].push_back(w);
          expq.push_back({1'b0, lastc && i == len - 1, w});
        end
      end
    end
    dq.push_back(d);
  endtask

  // descriptor pop
  // queue pops are applied just after the edge, once the design has sampled
  always @(posedge clk) if (rst_n) begin
    bit pop_d;
    logic [3:0] pop_x;
    pop_d = desc_rd;
    pop_x = ext_ren;
    #1;
    if (pop_d) void'(dq.pop_front());
    for (int f = 0; f < 4; f++) if (pop_x[f]) begin
      check(xq[f].size() != 0, "pop on empty FIFO");
      if (xq[f].size() != 0) void'(xq[f].pop_front());
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (ddl_valid && ddl_ready && !corrupt_phase) begin
      check(expq.size() != 0 && {ddl_sof, ddl_eof, ddl_data} == expq[0], "DAQ word");
      if (expq.size() != 0 && {ddl_sof, ddl_eof, ddl_data} != expq[0]) $display("  got %h exp %h", {ddl_sof, ddl_eof, ddl_data}, expq[0]);
      if (expq.size() != 0) void'(expq.pop_front());
      nwords++;
    end
  end

  // one word per clock when ready stays high: cycles from sof to eof
  int cyc_sof;
  always @(posedge clk) begin
    cyc_sof++;
    if (rst_n && ddl_valid && ddl_ready && !corrupt_phase) begin
      if (ddl_sof) begin cyc_sof = 0; words_in_ev = 0; end
      words_in_ev++;
      if (ddl_eof) begin
        ev_done++;
        if (full_rate && cyc_sof > words_in_ev - 1) begin
          fullrate_bad++;
          $display("event of %0d words took %0d clocks", words_in_ev, cyc_sof + 1);
        end
      end
    end
  end

  initial begin
    ovf_seen = 0; ddl_ready = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int k = 0; k < NEV - 10; k++) load_event((k % 5) == 2, k);
    fork
      begin
        while (expq.size() != 0) begin
          @(negedge clk);
          ddl_ready = ($urandom % 3) != 0;
        end
      end
    join
    @(negedge clk); ddl_ready = 1; full_rate = 1; ovf_seen = 1;
    for (int k = NEV - 10; k < NEV; k++) load_event(0, k);
    wait (expq.size() == 0);
    repeat (5) @(negedge clk);
    check(ev_done == NEV && events_sent == 16'(NEV), "all events sent");
    check(fullrate_bad == 0, "one word per clock at full rate");
    check(!frag_err && idle, "no fragment error, idle");
    // corrupted fragment header
    begin
      trig_desc_t d;
      d = '0;
      corrupt_phase = 1;
      for (int c = 0; c < 12; c++) if (EN[c]) xq[c / 3].push_back(frag_header(4'(c == 5 ? 6 : c), 0, 0, 0));
      dq.push_back(d);
      repeat (60) @(negedge clk);
      check(frag_err, "fragment error detected");
    end
    $display("words=%0d", nwords);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
