// tb_main_fpga: self-checking test of the central FPGA.
// The four external FIFOs are behavioural models that the testbench fills
// with fragments, the input FPGAs are replaced by end-of-event pulses, and
// commands go in through a testbench UART (16 clocks per bit). Scenarios:
//  1. TTC event (L0, L1 in the window, L1 message, L2a): triggers reach all
//     front ends, busy holds until every link reports end of event, and the
//     DAQ link carries the CDH (event ID, orbit, L1 message, classes, ROI)
//     followed by all twelve fragments unchanged;
//  2. a spurious L1: a header-only dummy event with the L1err status bit;
//  3. RS232 'E' mask: links 0-3 disabled once the readout is quiet; their
//     front ends get no triggers, their transceivers are disabled, and the
//     next event carries only links 4-11;
//  4. RS232 'T': a local trigger sequence produces an accepted event;
//  5. back-pressure: set by an almost-full flag, held while any FIFO is
//     half full, released after;
//  6. RS232 'S' status reply and 'R' soft reset.
module tb_main_fpga;
  import carlosrx_pkg::*;
  localparam int CPB = 16;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;

  logic        ttc_bc_rst = 0, ttc_l0 = 0, ttc_l1 = 0, ttc_l1m_valid = 0, ttc_l2a = 0, ttc_l2r = 0;
  logic [9:0]  ttc_l1m_data = 0;
  logic [49:0] ttc_l2_classes = 0;
  logic [35:0] ttc_l2_roi = 0;
  logic        busy, rst_out_n, ext_rst_n, ddl_valid, ddl_sof, ddl_eof, ddl_ready = 1;
  logic [11:0] fee_l0, fee_l1, fee_l2a, fee_l2r, ch_en, eoe = 0, xcvr_disable;
  logic [3:0]  ext_ren, ext_ef, ext_hf, ext_paf, ext_ff, ext_wen = 0, paf_force = 0, hf_force = 0;
  logic [3:0]  m_hf, m_paf;
  logic [3:0][31:0] ext_rdata, ext_wdata;
  logic [31:0] ddl_data;
  logic        uart_rx = 1, uart_tx;
  int          lvl[4], maxl[4];
  int checks = 0, failures = 0, n_rst_low = 0;
  logic [33:0] got[$];      // {sof, eof, data}
  logic [11:0] fee_seen;
  logic [7:0]  rxb[$];

  main_fpga #(.CLKS_PER_BIT(CPB)) dut (
    .clk, .rst_n, .ttc_bc_rst, .ttc_l0, .ttc_l1, .ttc_l1m_valid, .ttc_l1m_data, .ttc_l2a, .ttc_l2r,
    .ttc_l2_classes, .ttc_l2_roi, .busy, .fee_l0, .fee_l1, .fee_l2a, .fee_l2r, .ch_en,
    .rst_out_n, .eoe, .chan_afull(12'h0), .in_ovf(12'h0), .in_idle(2'b11), .ext_rst_n, .ext_ren,
    .ext_rdata, .ext_ef, .ext_hf, .ext_paf, .ddl_data, .ddl_valid, .ddl_sof, .ddl_eof, .ddl_ready,
    .xcvr_disable, .uart_rx, .uart_tx);

  for (genvar f = 0; f < 4; f++) begin : g_ext
    idt_fifo_model #(.DEPTH(1024), .PAF_OFFSET(64)) u_ext (
      .clk, .mrs_n(ext_rst_n), .wen(ext_wen[f]), .wdata(ext_wdata[f]), .ff(ext_ff[f]),
      .ren(ext_ren[f]), .rdata(ext_rdata[f]), .ef(ext_ef[f]), .hf(m_hf[f]), .paf(m_paf[f]),
      .level(lvl[f]), .max_level(maxl[f]));
  end
  assign ext_hf  = m_hf | hf_force;
  assign ext_paf = m_paf | paf_force;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic tick(input int n = 1);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (ddl_valid && ddl_ready) got.push_back({ddl_sof, ddl_eof, ddl_data});
    fee_seen |= fee_l0;
    if (!rst_out_n && !ext_rst_n) n_rst_low++;
  end

  // testbench UART
  task automatic send(input logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin uart_rx = f[i]; repeat (CPB) @(negedge clk); end
  endtask
  initial begin
    wait (rst_n); repeat (5) @(posedge clk);
    forever begin
      logic [7:0] b;
      @(negedge uart_tx);
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = uart_tx; end
      repeat (CPB) @(posedge clk);
      rxb.push_back(b);
    end
  end

  // write one fragment into external FIFO c/3 and remember it
  logic [31:0] frag_exp[$];
  task automatic load_frag(input int c, input int ev, input int len);
    logic [31:0] w;
    int f;
    f = c / 3;
    for (int i = -1; i < len; i++) begin
      w = (i < 0) ? frag_header(4'(c), 4'(ev), 1'b0, 16'(len)) : $urandom;
      frag_exp.push_back(w);
      ext_wdata[f] = w; ext_wen[f] = 1; tick(); ext_wen[f] = 0;
    end
  endtask

  // an accepted TTC sequence; returns the orbit and bunch values at L0
  task automatic ttc_event(input logic [9:0] msg, input logic [49:0] cl, input logic [35:0] roi,
                           output logic [11:0] bc, output logic [23:0] orb);
    bc = dut.u_trig.bc_q; orb = dut.u_trig.orbit_q;
    ttc_l0 = 1; tick(); ttc_l0 = 0;
    tick(214); ttc_l1 = 1; tick(); ttc_l1 = 0;
    tick(10); ttc_l1m_data = msg; ttc_l1m_valid = 1; tick(); ttc_l1m_valid = 0;
    tick(30); ttc_l2_classes = cl; ttc_l2_roi = roi; ttc_l2a = 1; tick(); ttc_l2a = 0;
  endtask

  // compare the collected DAQ words with an expected event
  task automatic check_event(input logic [11:0] bc, input logic [23:0] orb, input logic [9:0] msg,
                             input logic [49:0] cl, input logic [35:0] roi, input logic [15:0] status,
                             input string what);
    int n;
    n = 8 + frag_exp.size();
    check(got.size() == n, {what, ": event length"});
    if (got.size() == n) begin
      check(got[0][33] && got[n-1][32], {what, ": start/end marks"});
      check(got[0][31:0] == 32'hFFFFFFFF, {what, ": block length"});
      check(got[1][31:0] == {8'h02, msg, 2'b00, bc}, {what, ": CDH word 1"});
      check(got[2][31:0] == {8'h00, orb}, {what, ": CDH word 2"});
      check(got[3][31:0] == 32'h0000_0002, {what, ": CDH word 3"});
      check(got[4][27:12] == status && got[4][31:28] == 0, {what, ": status bits"});
      check(got[5][31:0] == cl[31:0] && got[6][17:0] == cl[49:32], {what, ": trigger classes"});
      check(got[6][31:28] == roi[3:0] && got[7][31:0] == roi[35:4], {what, ": ROI"});
      for (int i = 0; i < frag_exp.size(); i++) check(got[8+i][31:0] == frag_exp[i], {what, ": fragment word"});
    end
    got.delete(); frag_exp.delete();
  endtask

  logic [11:0] bc;
  logic [23:0] orb;
  initial begin
    ext_wdata = '0;
    tick(3); rst_n = 1; tick(5);
    fork forever begin tick(3564); ttc_bc_rst = 1; tick(); ttc_bc_rst = 0; end join_none
    tick(100);

    // 1. accepted TTC event with all links
    fee_seen = 0;
    ttc_event(10'h3C3, 50'h2_AAAA_5555_1234, 36'h9_8765_4321, bc, orb);
    check(fee_seen == 12'hFFF, "L0 to all front ends");
    tick(5); check(busy, "busy until data");
    for (int c = 0; c < 12; c++) begin load_frag(c, 0, 3 + c); eoe = 12'(1) << c; tick(); eoe = 0; end
    tick(5); check(!busy, "busy released after all end-of-event");
    tick(300);
    check_event(bc, orb, 10'h3C3, 50'h2_AAAA_5555_1234, 36'h9_8765_4321, 16'h0000, "TTC event");

    // 2. spurious L1: dummy with L1err
    ttc_l1 = 1; tick(); ttc_l1 = 0; tick(50);
    check(got.size() == 8 && got[7][32], "dummy event is header only");
    if (got.size() == 8) check(got[4][27:12] == 16'b0000_0000_0001_0010, "dummy status L1err");
    got.delete();

    // 3. mask links 0-3 off
    send(8'h45); send(8'h0F); send(8'hF0); tick(20);
    check(ch_en == 12'hFF0 && xcvr_disable == 12'h00F, "mask applied");
    fee_seen = 0;
    ttc_event(10'h001, 50'h1, 36'h1, bc, orb);
    check(fee_seen == 12'hFF0, "triggers only to enabled front ends");
    for (int c = 4; c < 12; c++) begin load_frag(c, 1, 2); eoe = 12'(1) << c; tick(); eoe = 0; end
    tick(100);
    check_event(bc, orb, 10'h001, 50'h1, 36'h1, 16'h0000, "masked event");

    // 4. local trigger via RS232
    send(8'h54);
    for (int c = 4; c < 12; c++) load_frag(c, 2, 1);
    tick(300);
    check(got.size() == 8 + frag_exp.size(), "local trigger event");
    if (got.size() > 4) check(got[4][27:12] == 0 && got[5][31:0] == 0, "local event: no error, no classes");
    got.delete(); frag_exp.delete();
    for (int c = 4; c < 12; c++) begin eoe = 12'(1) << c; tick(); eoe = 0; end
    tick(5);

    // 5. back-pressure hysteresis
    check(!dut.backpressure && !busy, "no back-pressure");
    hf_force[2] = 1; paf_force[2] = 1; tick(3);
    check(dut.backpressure && busy, "back-pressure on almost full");
    paf_force[2] = 0; tick(3);
    check(dut.backpressure && busy, "held while half full");
    hf_force[2] = 0; tick(3);
    check(!dut.backpressure && !busy, "released below half full");

    // 6. status and soft reset
    rxb.delete();
    send(8'h53); tick(10 * 10 * CPB);
    check(rxb.size() == 8, "status reply");
    if (rxb.size() == 8) check({rxb[0], rxb[1][7:4]} == 12'hFF0 && rxb[7] == 8'd4, "status: mask and event count");
    n_rst_low = 0;
    send(8'h52); tick(2);
    check(n_rst_low == 4, "soft reset drives the resets for four clocks");
    tick(10);
    check(rst_out_n && ch_en == 12'hFFF, "out of soft reset, mask back to all links");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
