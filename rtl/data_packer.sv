// data_packer: turns the 16-bit stream of one CARLOS link into 32-bit words.
//
// It pops the first-word-fall-through output of the input FIFO, where each
// 16-bit word carries a flag marking the last word of an event. Two successive
// words form one 32-bit word, the first in bits [15:0] and the second in
// [31:16]; an event with an odd number of 16-bit words has its last 32-bit
// word padded with zeros in [31:16]. Each 32-bit word goes to the channel's
// 4K buffer; the packer counts the words of the event and, with the last one,
// pushes {truncated, length} into the channel's event-length queue and pulses
// eoe. If the buffer is full a word is dropped and the event marked truncated,
// so an oversize event cannot block the store-and-forward scheduler. The
// packer stalls (stops popping) only when it holds the last word of an event
// and the length queue is full. One 16-bit word is consumed per clock.
// The 16-to-32-bit packing is the readout's; the half order, padding,
// truncation rule and end-of-event flag are this design's choices.
module data_packer (
  input  logic        clk,
  input  logic        rst_n,
  // input FIFO, first-word-fall-through
  input  logic [15:0] in_data,
  input  logic        in_last,
  input  logic        in_empty,
  output logic        in_rd,
  // channel buffer
  output logic        fifo_wr,
  output logic [31:0] fifo_wdata,
  input  logic        fifo_full,
  // event-length queue: {truncated, length}
  output logic        len_wr,
  output logic [16:0] len_wdata,
  input  logic        len_full,
  output logic        eoe
);
  logic        have_lo;
  logic [15:0] lo;
  logic [15:0] len;
  logic        trunc;
  logic        emit;      // a 32-bit word is produced this cycle
  logic        drop;      // ...but the buffer is full

  assign in_rd      = !in_empty && !(in_last && len_full);
  assign emit       = in_rd && (have_lo || in_last);
  assign drop       = emit && fifo_full;
  assign fifo_wr    = emit && !fifo_full;
  assign fifo_wdata = have_lo ? {in_data, lo} : {16'h0000, in_data};
  assign len_wr     = in_rd && in_last;
  assign len_wdata  = {trunc || drop, len + 16'(fifo_wr)};
  assign eoe        = len_wr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_lo <= 1'b0;
      lo      <= '0;
      len     <= '0;
      trunc   <= 1'b0;
    end else if (in_rd) begin
      if (in_last) begin
        have_lo <= 1'b0;
        len     <= '0;
        trunc   <= 1'b0;
      end else if (have_lo) begin
        have_lo <= 1'b0;
        len     <= len + 16'(fifo_wr);
        trunc   <= trunc || drop;
      end else begin
        have_lo <= 1'b1;
        lo      <= in_data;
      end
    end
  end
endmodule
