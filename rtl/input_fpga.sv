// input_fpga: one lateral FPGA of the readout board.
//
// Six CARLOS links come in as 16-bit words on their own recovered clocks.
// Each channel has a dual-clock input FIFO (to the system clock), a data
// packer (16 to 32 bits, event length counting), a 4K x 32 channel buffer and
// a small event-length queue. Channels 0-2 feed scheduler 0 and channels 3-5
// scheduler 1; each scheduler writes one external 32-bit FIFO. This follows
// the lateral-FPGA block diagram of the readout. Per channel the FPGA reports
// end-of-event (to the busy logic), buffer almost-full (either the buffer or
// the length queue) and a sticky input-FIFO overflow, synchronised to the
// system clock. A link word is taken while rx_valid is high, with rx_last
// marking the final word of an event; disabled channels are not written.
module input_fpga
  import carlosrx_pkg::*;
#(
  parameter int unsigned FIRST_CH  = 0,
  parameter int unsigned IN_DEPTH  = 16,
  parameter int unsigned CH_DEPTH  = 4096,
  parameter int unsigned EVQ_DEPTH = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // de-serialized links
  input  logic [5:0]           rx_clk,
  input  logic [5:0][15:0]     rx_data,
  input  logic [5:0]           rx_valid,
  input  logic [5:0]           rx_last,
  // control from / status to the main FPGA
  input  logic [5:0]           ch_en,
  output logic [5:0]           eoe,
  output logic [5:0]           chan_afull,
  output logic [5:0]           in_ovf,
  output logic                 idle,
  // two external FIFOs, write side
  output logic [1:0]           ext_wen,
  output logic [1:0][31:0]     ext_wdata,
  input  logic [1:0]           ext_ff
);
  logic [5:0]        in_empty, in_rd, in_last_q;
  logic [5:0][15:0]  in_data;
  logic [5:0]        ovf_w;
  logic [5:0]        ovf_s1;
  logic [5:0]        f_wr, f_full, f_rd, f_empty, f_af;
  logic [5:0][31:0]  f_wdata, f_rdata;
  logic [5:0]        l_wr, l_full, l_rd, l_empty, l_af;
  logic [5:0][16:0]  l_wdata, l_rdata;
  logic [1:0]        s_idle;

  for (genvar c = 0; c < 6; c++) begin : g_ch
    logic [16:0] afifo_rd;

    async_fifo #(.WIDTH(17), .DEPTH(IN_DEPTH)) u_in (
      .wclk(rx_clk[c]), .wrst_n(rst_n), .wr_en(rx_valid[c] && ch_en[c]),
      .wr_data({rx_last[c], rx_data[c]}), .full(), .overflow(ovf_w[c]),
      .rclk(clk), .rrst_n(rst_n), .rd_en(in_rd[c]), .rd_data(afifo_rd), .empty(in_empty[c]));

    assign in_last_q[c] = afifo_rd[16];
    assign in_data[c]   = afifo_rd[15:0];

    data_packer u_dp (
      .clk, .rst_n,
      .in_data(in_data[c]), .in_last(in_last_q[c]), .in_empty(in_empty[c]), .in_rd(in_rd[c]),
      .fifo_wr(f_wr[c]), .fifo_wdata(f_wdata[c]), .fifo_full(f_full[c]),
      .len_wr(l_wr[c]), .len_wdata(l_wdata[c]), .len_full(l_full[c]), .eoe(eoe[c]));

    sync_fifo #(.WIDTH(32), .DEPTH(CH_DEPTH)) u_buf (
      .clk, .rst_n, .wr_en(f_wr[c]), .wr_data(f_wdata[c]), .full(f_full[c]),
      .rd_en(f_rd[c]), .rd_data(f_rdata[c]), .empty(f_empty[c]), .count(), .almost_full(f_af[c]));

    sync_fifo #(.WIDTH(17), .DEPTH(EVQ_DEPTH)) u_len (
      .clk, .rst_n, .wr_en(l_wr[c]), .wr_data(l_wdata[c]), .full(l_full[c]),
      .rd_en(l_rd[c]), .rd_data(l_rdata[c]), .empty(l_empty[c]), .count(), .almost_full(l_af[c]));

    assign chan_afull[c] = f_af[c] || l_af[c];
  end

  // sticky overflow flags cross to the system clock
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ovf_s1 <= '0;
      in_ovf <= '0;
    end else begin
      ovf_s1 <= ovf_w;
      in_ovf <= ovf_s1;
    end
  end

  for (genvar s = 0; s < 2; s++) begin : g_sched
    scheduler #(.N_CH(3), .FIRST_CH(FIRST_CH + 3*s)) u_sched (
      .clk, .rst_n, .ch_en(ch_en[3*s +: 3]),
      .len_empty(l_empty[3*s +: 3]), .len_data(l_rdata[3*s +: 3]), .len_rd(l_rd[3*s +: 3]),
      .dat_empty(f_empty[3*s +: 3]), .dat_data(f_rdata[3*s +: 3]), .dat_rd(f_rd[3*s +: 3]),
      .ext_wen(ext_wen[s]), .ext_wdata(ext_wdata[s]), .ext_ff(ext_ff[s]), .idle(s_idle[s]));
  end

  assign idle = &s_idle && &in_empty && &l_empty;
endmodule
