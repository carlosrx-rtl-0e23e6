// daq_if: event builder and DAQ interface of the main FPGA.
//
// For every descriptor taken from the trigger queue it sends the eight-word
// Common Data Header, then, for a data event, the fragment of every enabled
// channel: channel c is read from external FIFO c/3, header first, then as
// many words as the header's length field says. Enabled channels are visited
// in increasing order, disabled ones skipped without a lost clock; this is
// the order the schedulers wrote them in. A dummy
// event (erroneous trigger sequence) or an event with no enabled channel is
// the header alone. The output is a 32-bit stream with valid/ready and start/
// end-of-event marks, held in one output register; a word is popped from an
// external FIFO (first-word-fall-through) only when the register can take it,
// so a full-rate link moves one word per clock. A fragment header whose
// marker or channel number does not match sets the sticky frag_err. The CDH
// layout is the ALICE one used by the readout; block length 0xFFFFFFFF,
// version, sub-detector bit and status encoding are this design's choices.
module daq_if
  import carlosrx_pkg::*;
#(
  parameter int unsigned N_EXT       = 4,
  parameter int unsigned CH_PER_EXT  = 3,
  parameter logic [7:0]  CDH_VERSION = 8'h02,
  parameter logic [23:0] SUBDET_MASK = 24'h000002
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // trigger descriptor queue, first-word-fall-through
  input  logic                        desc_empty,
  input  trig_desc_t                  desc,
  output logic                        desc_rd,
  input  logic [N_EXT*CH_PER_EXT-1:0] ch_en,
  input  logic [11:0]                 bc_now,
  input  logic                        ovf_seen,
  // external FIFO read sides
  input  logic [N_EXT-1:0]            ext_ef,
  input  logic [N_EXT-1:0][31:0]      ext_rdata,
  output logic [N_EXT-1:0]            ext_ren,
  // towards the SIU
  output logic [31:0]                 ddl_data,
  output logic                        ddl_valid,
  output logic                        ddl_sof,
  output logic                        ddl_eof,
  input  logic                        ddl_ready,
  output logic                        frag_err,
  output logic                        idle,
  output logic [15:0]                 events_sent
);
  localparam int unsigned NC = N_EXT * CH_PER_EXT;
  localparam int unsigned CW = $clog2(NC);
  localparam int unsigned FW = (N_EXT > 1) ? $clog2(N_EXT) : 1;

  typedef enum logic [1:0] {S_IDLE, S_CDH, S_HDR, S_DAT} state_t;

  state_t        state;
  trig_desc_t    d_q;
  logic [2:0]    idx;
  logic [CW-1:0] ch;
  logic [CW-1:0] last_ch;
  logic [NC-1:0] en_q;
  logic [FW-1:0] fsel;
  logic [15:0]   rem;
  logic          adv, src_ok, is_last_ch;
  logic [31:0]   src_word;

  assign adv        = !ddl_valid || ddl_ready;
  assign fsel       = FW'(32'(ch) / CH_PER_EXT);
  assign src_ok     = !ext_ef[fsel];
  assign src_word   = ext_rdata[fsel];
  assign is_last_ch = (ch == last_ch);
  assign idle       = (state == S_IDLE);
  assign desc_rd    = (state == S_IDLE) && !desc_empty;

  always_comb begin
    ext_ren = '0;
    if ((state == S_HDR || state == S_DAT) && adv) ext_ren[fsel] = src_ok;
  end

  // highest enabled channel, lowest enabled channel, and next enabled after ch
  logic [CW-1:0] first_ch, next_ch;
  always_comb begin
    last_ch  = '0;
    first_ch = '0;
    next_ch  = ch;
    for (int i = 0; i < NC; i++) if (en_q[i]) last_ch = CW'(i);
    for (int i = NC - 1; i >= 0; i--) begin
      if (en_q[i]) first_ch = CW'(i);
      if (en_q[i] && CW'(i) > ch) next_ch = CW'(i);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      d_q         <= '0;
      idx         <= '0;
      ch          <= '0;
      en_q        <= '0;
      rem         <= '0;
      ddl_data    <= '0;
      ddl_valid   <= 1'b0;
      ddl_sof     <= 1'b0;
      ddl_eof     <= 1'b0;
      frag_err    <= 1'b0;
      events_sent <= '0;
    end else begin
      if (ddl_valid && ddl_ready) begin
        ddl_valid <= 1'b0;
        if (ddl_eof) events_sent <= events_sent + 1'b1;
      end
      unique case (state)
        S_IDLE: if (!desc_empty) begin
          d_q   <= desc;
          en_q  <= desc.dummy ? '0 : ch_en;
          idx   <= '0;
          state <= S_CDH;
        end
        S_CDH: if (adv) begin
          ddl_valid <= 1'b1;
          ddl_data  <= cdh_word(d_q, idx, CDH_VERSION, SUBDET_MASK, bc_now, ovf_seen);
          ddl_sof   <= (idx == 3'd0);
          ddl_eof   <= (idx == 3'd7) && (en_q == '0);
          idx       <= idx + 1'b1;
          ch        <= first_ch;
          if (idx == 3'd7) state <= (en_q == '0) ? S_IDLE : S_HDR;
        end
        S_HDR: begin
          if (adv && src_ok) begin
            ddl_valid <= 1'b1;
            ddl_data  <= src_word;
            ddl_sof   <= 1'b0;
            ddl_eof   <= is_last_ch && (src_word[15:0] == '0);
            rem       <= src_word[15:0];
            if (src_word[31:28] != FRAG_MARK || src_word[23:20] != 4'(ch)) frag_err <= 1'b1;
            if (src_word[15:0] != '0) state <= S_DAT;
            else if (is_last_ch) state <= S_IDLE;
            else ch <= next_ch;
          end
        end
        default: if (adv && src_ok) begin
          ddl_valid <= 1'b1;
          ddl_data  <= src_word;
          ddl_sof   <= 1'b0;
          ddl_eof   <= is_last_ch && (rem == 16'd1);
          rem       <= rem - 1'b1;
          if (rem == 16'd1) begin
            if (is_last_ch) state <= S_IDLE;
            else begin
              ch    <= next_ch;
              state <= S_HDR;
            end
          end
        end
      endcase
    end
  end

  // the output register is only reloaded when the SIU has taken its word
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (ddl_valid && !ddl_ready) |=> (ddl_valid && $stable(ddl_data)));
endmodule
