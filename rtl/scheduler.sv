// scheduler: round-robin transfer of whole events from three channel buffers
// into one external FIFO.
//
// The pointer visits the enabled channels in a fixed order. When the current
// channel has a complete event (its length queue is not empty) the scheduler
// pops the length, writes a fragment header (marker, truncated flag, channel
// number, event count mod 16, length) to the external FIFO and then copies
// exactly that many words from the channel buffer, one per clock while the
// external FIFO is not full. Only then does
// the pointer move on, skipping disabled channels. Because the turn passes
// strictly by event, each external FIFO holds the fragments of one trigger
// for its channels in channel order, followed by those of the next trigger,
// and the event builder can read them back without reordering. The readout
// gives round-robin buffer management; event-granular turns and the header
// format are this design's choices.
module scheduler
  import carlosrx_pkg::*;
#(
  parameter int unsigned N_CH     = 3,
  parameter int unsigned FIRST_CH = 0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [N_CH-1:0]        ch_en,
  // per-channel event-length queues
  input  logic [N_CH-1:0]        len_empty,
  input  logic [N_CH-1:0][16:0]  len_data,
  output logic [N_CH-1:0]        len_rd,
  // per-channel data buffers
  input  logic [N_CH-1:0]        dat_empty,
  input  logic [N_CH-1:0][31:0]  dat_data,
  output logic [N_CH-1:0]        dat_rd,
  // external FIFO write side
  output logic                   ext_wen,
  output logic [31:0]            ext_wdata,
  input  logic                   ext_ff,
  output logic                   idle
);
  localparam int unsigned PW = (N_CH > 1) ? $clog2(N_CH) : 1;

  typedef enum logic [1:0] {S_SEL, S_HDR, S_DATA} state_t;
  state_t            state;
  logic [PW-1:0]     cur;
  logic [15:0]       remaining;
  logic              trunc_q;
  logic [3:0]        evcnt [N_CH];
  logic              can_write;
  logic [PW-1:0]     cur_nxt;

  assign can_write = !ext_ff;
  assign cur_nxt   = (cur == PW'(N_CH - 1)) ? '0 : cur + 1'b1;
  assign idle      = (state == S_SEL);

  always_comb begin
    len_rd    = '0;
    dat_rd    = '0;
    ext_wen   = 1'b0;
    ext_wdata = dat_data[cur];
    unique case (state)
      S_SEL:  len_rd[cur] = ch_en[cur] && !len_empty[cur];
      S_HDR: begin
        ext_wen   = can_write;
        ext_wdata = frag_header(4'(FIRST_CH + 32'(cur)), evcnt[cur], trunc_q, remaining);
      end
      default: begin
        ext_wen     = can_write && !dat_empty[cur];
        dat_rd[cur] = ext_wen;
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_SEL;
      cur       <= '0;
      remaining <= '0;
      trunc_q   <= 1'b0;
      for (int i = 0; i < N_CH; i++) evcnt[i] <= '0;
    end else begin
      unique case (state)
        S_SEL: begin
          if (!ch_en[cur]) cur <= cur_nxt;
          else if (!len_empty[cur]) begin
            remaining <= len_data[cur][15:0];
            trunc_q   <= len_data[cur][16];
            state     <= S_HDR;
          end
        end
        S_HDR: if (can_write) begin
          evcnt[cur] <= evcnt[cur] + 1'b1;
          if (remaining == '0) begin
            cur   <= cur_nxt;
            state <= S_SEL;
          end else state <= S_DATA;
        end
        default: if (ext_wen) begin
          remaining <= remaining - 1'b1;
          if (remaining == 16'd1) begin
            cur   <= cur_nxt;
            state <= S_SEL;
          end
        end
      endcase
    end
  end

  // A fragment is only started when its length is known, so its data must
  // already be in the buffer: the buffer can never run dry mid-fragment.
  a_no_underrun: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_DATA && can_write) |-> !dat_empty[cur]);
endmodule
