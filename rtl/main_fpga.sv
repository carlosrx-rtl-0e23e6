// main_fpga: central FPGA of the readout board.
//
// It joins the trigger interface (TTC strobes ORed with the local trigger
// sequencer), a queue of trigger descriptors, the event builder that reads
// the four external FIFOs and feeds the DAQ link, the busy logic towards the
// LTU, the link-enable control and the RS232 debug port. Triggers accepted by
// the trigger interface are repeated to every enabled link's front end. The
// RS232 reset command resets all of the readout except the RS232 port itself,
// and also drives the external FIFOs' reset (ext_rst_n) and the input FPGAs'
// reset (rst_out_n) for four clocks. The status word reported over RS232 is
//   [63:52] channel enables   [51:40] input FIFO overflow  [39:28] buffer almost full
//   [27:24] ext. FIFO empty   [23:20] ext. half full       [19:16] ext. almost full
//   [15] busy [14] back-pressure [13] fragment error [12] descriptor queue empty
//   [11:0]  events sent (mod 4096).
// The descriptor queue depth (16) and the status layout are this design's
// choices.
module main_fpga
  import carlosrx_pkg::*;
#(
  parameter int unsigned EVQ_DEPTH    = 16,
  parameter int unsigned L1_MIN       = 200,
  parameter int unsigned L1_MAX       = 230,
  parameter int unsigned L1M_TIMEOUT  = 100,
  parameter int unsigned L2_TIMEOUT   = 4500,
  parameter int unsigned CLKS_PER_BIT = 348
) (
  input  logic               clk,
  input  logic               rst_n,
  // TTC receiver
  input  logic               ttc_bc_rst,
  input  logic               ttc_l0,
  input  logic               ttc_l1,
  input  logic               ttc_l1m_valid,
  input  logic [9:0]         ttc_l1m_data,
  input  logic               ttc_l2a,
  input  logic               ttc_l2r,
  input  logic [49:0]        ttc_l2_classes,
  input  logic [35:0]        ttc_l2_roi,
  // LTU
  output logic               busy,
  // front-end triggers per link
  output logic [11:0]        fee_l0,
  output logic [11:0]        fee_l1,
  output logic [11:0]        fee_l2a,
  output logic [11:0]        fee_l2r,
  // input FPGAs
  output logic [11:0]        ch_en,
  output logic               rst_out_n,
  input  logic [11:0]        eoe,
  input  logic [11:0]        chan_afull,
  input  logic [11:0]        in_ovf,
  input  logic [1:0]         in_idle,
  // external FIFOs, read side and flags
  output logic               ext_rst_n,
  output logic [3:0]         ext_ren,
  input  logic [3:0][31:0]   ext_rdata,
  input  logic [3:0]         ext_ef,
  input  logic [3:0]         ext_hf,
  input  logic [3:0]         ext_paf,
  // DAQ link (SIU)
  output logic [31:0]        ddl_data,
  output logic               ddl_valid,
  output logic               ddl_sof,
  output logic               ddl_eof,
  input  logic               ddl_ready,
  // transceivers
  output logic [11:0]        xcvr_disable,
  // RS232
  input  logic               uart_rx,
  output logic               uart_tx
);
  logic        soft_rst, sw_trig;
  logic [2:0]  srst_cnt;
  logic        rrst_n;
  logic        g_l0, g_l1, g_l1m, g_l2a, g_active;
  logic        desc_valid, desc_full, desc_empty, desc_rd, desc_af;
  trig_desc_t  desc_in, desc_out;
  logic        l2a_acc, seq_busy;
  logic        t_l0, t_l1, t_l2a, t_l2r;
  logic [11:0] bc_now;
  logic        backpressure, wait_data, frag_err, daq_idle;
  logic [15:0] events_sent;
  logic        mask_wr;
  logic [11:0] mask_data;
  logic        quiet;
  logic [63:0] status;

  // soft reset from the RS232 port, four clocks long
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) srst_cnt <= '0;
    else if (soft_rst) srst_cnt <= 3'd4;
    else if (srst_cnt != '0) srst_cnt <= srst_cnt - 1'b1;
  end
  assign rrst_n    = rst_n && (srst_cnt == '0);
  assign rst_out_n = rrst_n;
  assign ext_rst_n = rrst_n;

  sw_trig_gen #(.L1_DELAY((L1_MIN + L1_MAX) / 2), .L2_DELAY(16)) u_swtrig (
    .clk, .rst_n(rrst_n), .start(sw_trig), .l0(g_l0), .l1(g_l1), .l1m_valid(g_l1m), .l2a(g_l2a),
    .active(g_active));

  trigger_if #(.L1_MIN(L1_MIN), .L1_MAX(L1_MAX), .L1M_TIMEOUT(L1M_TIMEOUT), .L2_TIMEOUT(L2_TIMEOUT)) u_trig (
    .clk, .rst_n(rrst_n), .bc_rst(ttc_bc_rst),
    .l0(ttc_l0 || g_l0), .l1(ttc_l1 || g_l1),
    .l1m_valid(ttc_l1m_valid || g_l1m), .l1m_data(g_active ? 10'd0 : ttc_l1m_data),
    .l2a(ttc_l2a || g_l2a), .l2r(ttc_l2r),
    .l2_classes(g_active ? 50'd0 : ttc_l2_classes), .l2_roi(g_active ? 36'd0 : ttc_l2_roi),
    .desc_valid, .desc(desc_in), .l2a_acc,
    .fee_l0(t_l0), .fee_l1(t_l1), .fee_l2a(t_l2a), .fee_l2r(t_l2r), .seq_busy, .bc_now);

  assign fee_l0  = {12{t_l0}}  & ch_en;
  assign fee_l1  = {12{t_l1}}  & ch_en;
  assign fee_l2a = {12{t_l2a}} & ch_en;
  assign fee_l2r = {12{t_l2r}} & ch_en;

  sync_fifo #(.WIDTH(DESC_W), .DEPTH(EVQ_DEPTH), .AF_LEVEL(EVQ_DEPTH - 2)) u_evq (
    .clk, .rst_n(rrst_n), .wr_en(desc_valid), .wr_data(desc_in), .full(desc_full),
    .rd_en(desc_rd), .rd_data(desc_out), .empty(desc_empty), .count(), .almost_full(desc_af));

  daq_if u_daq (
    .clk, .rst_n(rrst_n), .desc_empty, .desc(desc_out), .desc_rd, .ch_en, .bc_now,
    .ovf_seen(|in_ovf), .ext_ef, .ext_rdata, .ext_ren,
    .ddl_data, .ddl_valid, .ddl_sof, .ddl_eof, .ddl_ready, .frag_err, .idle(daq_idle), .events_sent);

  busy_ctrl #(.N_CH(12), .N_EXT(4)) u_busy (
    .clk, .rst_n(rrst_n), .seq_busy, .l2a_acc, .eoe, .ch_en, .ext_paf, .ext_hf, .chan_afull,
    .evq_afull(desc_af), .busy, .backpressure, .wait_data);

  assign quiet = !seq_busy && !wait_data && daq_idle && desc_empty && (&in_idle) && (&ext_ef);

  xcvr_ctrl #(.N_CH(12)) u_xcvr (
    .clk, .rst_n(rrst_n), .wr(mask_wr), .wdata(mask_data), .quiet, .ch_en, .xcvr_disable, .pending());

  assign status = {ch_en, in_ovf, chan_afull, ext_ef, ext_hf, ext_paf,
                   busy, backpressure, frag_err, desc_empty, events_sent[11:0]};

  rs232_if #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rs232 (
    .clk, .rst_n, .rx(uart_rx), .tx(uart_tx), .status,
    .spy_word(ddl_data), .spy_valid(ddl_valid && ddl_ready),
    .soft_rst, .sw_trig, .mask_wr, .mask_data, .spy_on());

  // busy keeps the descriptor queue from overflowing
  a_evq_no_overflow: assert property (@(posedge clk) disable iff (!rrst_n) !(desc_valid && desc_full));
endmodule
