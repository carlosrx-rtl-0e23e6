// xcvr_ctrl: enable mask of the 12 optical links.
//
// A broken module is removed from the acquisition by disabling its link. A new
// mask written here (wr/wdata) is held as pending and applied only while the
// readout is quiet (no trigger sequence, no event in the builder, schedulers
// idle and all FIFOs empty), so the schedulers and the event builder always
// agree on which channels take part in an event. The applied mask drives the
// transceivers' transmit-disable pins (active high, inverse of the mask) and
// the channel enables of the input FPGAs and the event builder. Enabling and
// disabling links is the readout's; the deferred update and the reset mask
// (all links on) are this design's choices.
module xcvr_ctrl #(
  parameter int unsigned      N_CH       = 12,
  parameter logic [N_CH-1:0]  RESET_MASK = '1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            wr,
  input  logic [N_CH-1:0] wdata,
  input  logic            quiet,
  output logic [N_CH-1:0] ch_en,
  output logic [N_CH-1:0] xcvr_disable,
  output logic            pending
);
  logic [N_CH-1:0] next_mask;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ch_en        <= RESET_MASK;
      xcvr_disable <= ~RESET_MASK;
      next_mask    <= RESET_MASK;
      pending      <= 1'b0;
    end else begin
      if (wr) begin
        next_mask <= wdata;
        pending   <= 1'b1;
      end else if (pending && quiet) begin
        ch_en        <= next_mask;
        xcvr_disable <= ~next_mask;
        pending      <= 1'b0;
      end
    end
  end
endmodule
