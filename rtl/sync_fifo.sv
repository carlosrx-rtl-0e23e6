// sync_fifo: single-clock first-word-fall-through FIFO.
//
// Used as the 4K x 32 channel buffer of each CARLOS link (the store-and-
// forward memory between the data packer and the scheduler), as the
// event-length queue of each channel and as the trigger-descriptor queue of
// the main FPGA. The memory is a plain array; rd_data always shows the oldest
// word while empty is low, and rd_en pops it. Writes while full and reads
// while empty are ignored. count is the fill level, almost_full is high from
// AF_LEVEL words on. Depth must be a power of two. The 4K default is the
// channel-buffer size of the readout; the almost-full level is this design's
// choice (three quarters).
module sync_fifo #(
  parameter int unsigned WIDTH    = 32,
  parameter int unsigned DEPTH    = 4096,
  parameter int unsigned AF_LEVEL = (DEPTH * 3) / 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [WIDTH-1:0]           wr_data,
  output logic                       full,
  input  logic                       rd_en,
  output logic [WIDTH-1:0]           rd_data,
  output logic                       empty,
  output logic [$clog2(DEPTH):0]     count,
  output logic                       almost_full
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign full        = (count == (AW+1)'(DEPTH));
  assign empty       = (count == '0);
  assign almost_full = (count >= (AW+1)'(AF_LEVEL));
  assign do_wr       = wr_en && !full;
  assign do_rd       = rd_en && !empty;
  assign rd_data     = mem[rptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end
endmodule
