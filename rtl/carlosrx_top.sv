// carlosrx_top: firmware of the CARLOSrx data-processing board.
//
// Twelve CARLOS links (16-bit words from the de-serializers, each on its own
// recovered clock) enter two input FPGAs of six links each. Each input FPGA
// packs the words of every link into 32-bit words, stores whole events in a
// 4K-word buffer per link and, through two round-robin schedulers, writes
// them as tagged fragments into two of the four large external FIFOs. The
// main FPGA follows the trigger sequence from the TTC receiver, keeps the
// busy signal to the LTU, and reads the four external FIFOs to send each
// event, led by the eight-word Common Data Header, to the DAQ link. The
// external FIFOs, the TTC receiver, the DAQ link card, the transceivers and
// the de-serializers are separate chips: their pins are the ports of this
// module. The external FIFOs are read in first-word-fall-through mode and
// their write side honours the full flag; the main FPGA uses their empty,
// half-full and almost-full flags. Everything except the link inputs runs on
// the 40.08 MHz system clock clk; rst_n is asynchronous and active low.
module carlosrx_top
  import carlosrx_pkg::*;
#(
  parameter int unsigned CH_DEPTH     = 4096,
  parameter int unsigned L1_MIN       = 200,
  parameter int unsigned L1_MAX       = 230,
  parameter int unsigned L1M_TIMEOUT  = 100,
  parameter int unsigned L2_TIMEOUT   = 4500,
  parameter int unsigned CLKS_PER_BIT = 348
) (
  input  logic               clk,
  input  logic               rst_n,
  // de-serialized CARLOS links
  input  logic [11:0]        rx_clk,
  input  logic [11:0][15:0]  rx_data,
  input  logic [11:0]        rx_valid,
  input  logic [11:0]        rx_last,
  // external FIFOs
  output logic               ext_rst_n,
  output logic [3:0]         ext_wen,
  output logic [3:0][31:0]   ext_wdata,
  input  logic [3:0]         ext_ff,
  output logic [3:0]         ext_ren,
  input  logic [3:0][31:0]   ext_rdata,
  input  logic [3:0]         ext_ef,
  input  logic [3:0]         ext_hf,
  input  logic [3:0]         ext_paf,
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
  // front-end triggers (towards the links' control encoders)
  output logic [11:0]        fee_l0,
  output logic [11:0]        fee_l1,
  output logic [11:0]        fee_l2a,
  output logic [11:0]        fee_l2r,
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
  logic [11:0] ch_en, eoe, chan_afull, in_ovf;
  logic [1:0]  in_idle;
  logic        irst_n;

  for (genvar f = 0; f < 2; f++) begin : g_in
    input_fpga #(.FIRST_CH(6*f), .CH_DEPTH(CH_DEPTH)) u_in (
      .clk, .rst_n(irst_n),
      .rx_clk(rx_clk[6*f +: 6]), .rx_data(rx_data[6*f +: 6]), .rx_valid(rx_valid[6*f +: 6]),
      .rx_last(rx_last[6*f +: 6]),
      .ch_en(ch_en[6*f +: 6]),
      .eoe(eoe[6*f +: 6]), .chan_afull(chan_afull[6*f +: 6]), .in_ovf(in_ovf[6*f +: 6]),
      .idle(in_idle[f]),
      .ext_wen(ext_wen[2*f +: 2]), .ext_wdata(ext_wdata[2*f +: 2]), .ext_ff(ext_ff[2*f +: 2]));
  end

  main_fpga #(.L1_MIN(L1_MIN), .L1_MAX(L1_MAX), .L1M_TIMEOUT(L1M_TIMEOUT), .L2_TIMEOUT(L2_TIMEOUT),
              .CLKS_PER_BIT(CLKS_PER_BIT)) u_main (
    .clk, .rst_n,
    .ttc_bc_rst, .ttc_l0, .ttc_l1, .ttc_l1m_valid, .ttc_l1m_data, .ttc_l2a, .ttc_l2r,
    .ttc_l2_classes, .ttc_l2_roi,
    .busy, .fee_l0, .fee_l1, .fee_l2a, .fee_l2r,
    .ch_en, .rst_out_n(irst_n), .eoe, .chan_afull, .in_ovf, .in_idle,
    .ext_rst_n, .ext_ren, .ext_rdata, .ext_ef, .ext_hf, .ext_paf,
    .ddl_data, .ddl_valid, .ddl_sof, .ddl_eof, .ddl_ready,
    .xcvr_disable, .uart_rx, .uart_tx);
endmodule
