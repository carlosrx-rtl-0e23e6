// async_fifo: dual-clock FIFO between a de-serializer and the system clock.
//
// Each CARLOS link arrives as 16-bit words on the recovered clock of its
// de-serializer; this FIFO hands them to the 40.08 MHz system clock. It is the
// usual Gray-pointer design: each side keeps a binary and a Gray pointer one
// bit wider than the address, the Gray pointer crosses to the other side
// through two flip-flops, and full/empty are decided on Gray values. The read
// side is first-word-fall-through. A word offered while the FIFO is full is
// dropped and the sticky overflow flag (write clock domain) is set. The depth
// (16) and the drop-on-full policy are this design's choices; the readout only
// specifies a dual-clock FIFO in front of the data packer. Both resets are
// asynchronous and active low.
module async_fifo #(
  parameter int unsigned WIDTH = 17,
  parameter int unsigned DEPTH = 16
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  output logic             overflow,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wq1_rgray, wq2_rgray, rq1_wgray, rq2_wgray;
  logic [AW:0] wbin_nxt, rbin_nxt;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write side
  assign full     = (wgray == {~wq2_rgray[AW:AW-1], wq2_rgray[AW-2:0]});
  assign wbin_nxt = wbin + (AW+1)'(wr_en && !full);

  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; wq1_rgray <= '0; wq2_rgray <= '0; overflow <= 1'b0;
    end else begin
      wbin      <= wbin_nxt;
      wgray     <= bin2gray(wbin_nxt);
      wq1_rgray <= rgray;
      wq2_rgray <= wq1_rgray;
      if (wr_en && full) overflow <= 1'b1;
    end
  end

  // read side
  assign empty    = (rgray == rq2_wgray);
  assign rbin_nxt = rbin + (AW+1)'(rd_en && !empty);
  assign rd_data  = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; rq1_wgray <= '0; rq2_wgray <= '0;
    end else begin
      rbin      <= rbin_nxt;
      rgray     <= bin2gray(rbin_nxt);
      rq1_wgray <= wgray;
      rq2_wgray <= rq1_wgray;
    end
  end
endmodule
