// trigger_if: trigger interface of the main FPGA.
//
// It follows the ALICE three-level trigger sequence delivered by the TTC
// receiver: L0, then L1 inside a latency window, then the L1 trigger message,
// then L2 accept (L2a, with the L2 message: trigger classes and region of
// interest) or L2 reject (L2r). A 12-bit bunch counter runs at the bunch-
// crossing clock and is cleared by the orbit strobe (bc_rst), which also
// advances the 24-bit orbit counter; both are latched at L0 as the event ID.
// Valid strobes are forwarded, one clock later, to the front end. An L2a
// pushes a descriptor for a data event. A sequence that breaks the rules
// pushes a dummy descriptor (no data) with the matching error bit and sends
// the front end an L2r so it drops the event:
//   L0error  L0 while a sequence is open;
//   L1err    L1 before L1_MIN or after L0 was dropped, or with no L0;
//   L1merr   L1 message missing L1M_TIMEOUT clocks after L1, or unexpected;
//   L2err    no L2 within L2_TIMEOUT clocks of the L1 message, or unexpected.
// No L1 by L1_MAX clocks after L0 is an ordinary L1 reject. The four error
// names and the dummy events with error bits are the readout's; their exact
// conditions and all latencies are this design's choices. seq_busy is high
// while a sequence is open.
module trigger_if
  import carlosrx_pkg::*;
#(
  parameter int unsigned L1_MIN       = 200,
  parameter int unsigned L1_MAX       = 230,
  parameter int unsigned L1M_TIMEOUT  = 100,
  parameter int unsigned L2_TIMEOUT   = 4500,
  parameter int unsigned BC_PER_ORBIT = 3564
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bc_rst,
  input  logic        l0,
  input  logic        l1,
  input  logic        l1m_valid,
  input  logic [9:0]  l1m_data,
  input  logic        l2a,
  input  logic        l2r,
  input  logic [49:0] l2_classes,
  input  logic [35:0] l2_roi,
  output logic        desc_valid,
  output trig_desc_t  desc,
  output logic        l2a_acc,
  output logic        fee_l0,
  output logic        fee_l1,
  output logic        fee_l2a,
  output logic        fee_l2r,
  output logic        seq_busy,
  output logic [11:0] bc_now
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT_L1, S_WAIT_L1M, S_WAIT_L2} state_t;

  state_t      state;
  logic [12:0] cnt;
  logic [11:0] bc_q;
  logic [23:0] orbit_q;
  logic [11:0] ev_bc;
  logic [23:0] ev_orbit;
  logic [9:0]  ev_l1m;
  trig_err_t   err;
  logic        timeout_l1m, timeout_l2, l1_reject, l1_ok;

  assign bc_now      = bc_q;
  assign seq_busy    = (state != S_IDLE);
  assign l1_ok       = (cnt >= 13'(L1_MIN)) && (cnt <= 13'(L1_MAX));
  assign l1_reject   = (state == S_WAIT_L1)  && (cnt > 13'(L1_MAX));
  assign timeout_l1m = (state == S_WAIT_L1M) && (cnt > 13'(L1M_TIMEOUT));
  assign timeout_l2  = (state == S_WAIT_L2)  && (cnt > 13'(L2_TIMEOUT));

  // error classification of this clock's strobes against the current state
  always_comb begin
    err = '0;
    unique case (state)
      S_IDLE: begin
        err.l1err  = l1;
        err.l1merr = l1m_valid;
        err.l2err  = l2a || l2r;
      end
      S_WAIT_L1: begin
        err.l0err  = l0;
        err.l1err  = l1 && !l1_ok;
        err.l1merr = l1m_valid;
        err.l2err  = l2a || l2r;
      end
      S_WAIT_L1M: begin
        err.l0err  = l0;
        err.l1err  = l1;
        err.l1merr = timeout_l1m;
        err.l2err  = l2a || l2r;
      end
      default: begin
        err.l0err  = l0;
        err.l1err  = l1;
        err.l1merr = l1m_valid;
        err.l2err  = timeout_l2 || (l2a && l2r);
      end
    endcase
  end

  // bunch-crossing and orbit counters
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bc_q    <= '0;
      orbit_q <= '0;
    end else if (bc_rst) begin
      bc_q    <= '0;
      orbit_q <= orbit_q + 1'b1;
    end else begin
      bc_q <= (bc_q == 12'(BC_PER_ORBIT - 1)) ? '0 : bc_q + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cnt        <= '0;
      ev_bc      <= '0;
      ev_orbit   <= '0;
      ev_l1m     <= '0;
      desc_valid <= 1'b0;
      desc       <= '0;
      l2a_acc    <= 1'b0;
      fee_l0     <= 1'b0;
      fee_l1     <= 1'b0;
      fee_l2a    <= 1'b0;
      fee_l2r    <= 1'b0;
    end else begin
      desc_valid <= 1'b0;
      l2a_acc    <= 1'b0;
      fee_l0     <= 1'b0;
      fee_l1     <= 1'b0;
      fee_l2a    <= 1'b0;
      fee_l2r    <= 1'b0;
      cnt        <= (cnt == '1) ? cnt : cnt + 1'b1;
      if (err != '0) begin
        // erroneous sequence: dummy event with error bits
        desc_valid    <= 1'b1;
        desc          <= '0;
        desc.dummy    <= 1'b1;
        desc.err      <= err;
        desc.bc       <= (state == S_IDLE) ? bc_q : ev_bc;
        desc.orbit    <= (state == S_IDLE) ? orbit_q : ev_orbit;
        desc.l1msg    <= (state == S_IDLE) ? '0 : ev_l1m;
        fee_l2r       <= (state != S_IDLE);
        state         <= S_IDLE;
      end else begin
        unique case (state)
          S_IDLE: if (l0) begin
            ev_bc    <= bc_q;
            ev_orbit <= orbit_q;
            ev_l1m   <= '0;
            fee_l0   <= 1'b1;
            cnt      <= 13'd1;
            state    <= S_WAIT_L1;
          end
          S_WAIT_L1: begin
            if (l1) begin
              fee_l1 <= 1'b1;
              cnt    <= 13'd1;
              state  <= S_WAIT_L1M;
            end else if (l1_reject) state <= S_IDLE;
          end
          S_WAIT_L1M: if (l1m_valid) begin
            ev_l1m <= l1m_data;
            cnt    <= 13'd1;
            state  <= S_WAIT_L2;
          end
          default: begin
            if (l2a) begin
              desc_valid    <= 1'b1;
              desc.dummy    <= 1'b0;
              desc.err      <= '0;
              desc.bc       <= ev_bc;
              desc.orbit    <= ev_orbit;
              desc.l1msg    <= ev_l1m;
              desc.classes  <= l2_classes;
              desc.roi      <= l2_roi;
              l2a_acc       <= 1'b1;
              fee_l2a       <= 1'b1;
              state         <= S_IDLE;
            end else if (l2r) begin
              fee_l2r <= 1'b1;
              state   <= S_IDLE;
            end
          end
        endcase
      end
    end
  end
endmodule
