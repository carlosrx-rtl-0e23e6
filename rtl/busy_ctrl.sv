// busy_ctrl: busy signal to the Local Trigger Unit and back-pressure.
//
// Busy rises with L0 (seq_busy from the trigger interface) and, once an event
// is accepted (l2a_acc), stays up until every enabled channel has reported the
// end of that event's data (eoe), i.e. until the front end can take a new
// trigger. Back-pressure is set when any external FIFO raises its almost-full
// flag and released only once all of them are below half full; it is part of
// busy, so it stops new triggers and with them the incoming data. It does not
// pause the schedulers: the event builder reads the FIFOs in a fixed order and
// may be waiting for the rest of a fragment that a paused scheduler would hold
// back, so pausing them could deadlock; the FIFOs' full flags alone guard the
// writes. Busy is also raised while the trigger descriptor queue or any enabled channel buffer is almost full. Busy after
// L0 and the full/half-full hysteresis are the readout's; the front-end
// "ready" condition (all enabled channels delivered) is this design's choice.
// All outputs are registered.
module busy_ctrl #(
  parameter int unsigned N_CH  = 12,
  parameter int unsigned N_EXT = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             seq_busy,
  input  logic             l2a_acc,
  input  logic [N_CH-1:0]  eoe,
  input  logic [N_CH-1:0]  ch_en,
  input  logic [N_EXT-1:0] ext_paf,
  input  logic [N_EXT-1:0] ext_hf,
  input  logic [N_CH-1:0]  chan_afull,
  input  logic             evq_afull,
  output logic             busy,
  output logic             backpressure,
  output logic             wait_data
);
  logic [N_CH-1:0] done;
  logic [N_CH-1:0] done_nxt;

  assign done_nxt = done | eoe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      backpressure <= 1'b0;
      wait_data    <= 1'b0;
      done         <= '0;
      busy         <= 1'b0;
    end else begin
      if (|ext_paf)       backpressure <= 1'b1;
      else if (!(|ext_hf)) backpressure <= 1'b0;

      if (l2a_acc) begin
        wait_data <= 1'b1;
        done      <= '0;
      end else if (wait_data) begin
        done <= done_nxt;
        if (&(done_nxt | ~ch_en)) wait_data <= 1'b0;
      end

      busy <= seq_busy || wait_data || l2a_acc || backpressure || |ext_paf ||
              evq_afull || |(chan_afull & ch_en);
    end
  end
endmodule
