// sw_trig_gen: local trigger sequencer for debugging without a central
// trigger.
//
// A start pulse (the "start trigger" command of the RS232 port) plays a full
// accepted sequence: L0 at once, L1 L1_DELAY clocks later, the L1 message
// (all zeros) on the next clock and L2a L2_DELAY clocks after that. Its
// strobes are ORed with those of the TTC receiver, so the trigger interface
// checks and records the event as any other. A start while a sequence runs is
// ignored. The command comes from the readout; the sequence and its timing
// are this design's choices (L1_DELAY inside the trigger interface's window).
module sw_trig_gen #(
  parameter int unsigned L1_DELAY = 210,
  parameter int unsigned L2_DELAY = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic l0,
  output logic l1,
  output logic l1m_valid,
  output logic l2a,
  output logic active
);
  localparam int unsigned TOTAL = L1_DELAY + 1 + L2_DELAY;
  logic [$clog2(TOTAL+1)-1:0] t;

  assign l0        = active && (t == '0);
  assign l1        = active && (t == $bits(t)'(L1_DELAY));
  assign l1m_valid = active && (t == $bits(t)'(L1_DELAY + 1));
  assign l2a       = active && (t == $bits(t)'(TOTAL));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      t      <= '0;
    end else if (!active) begin
      active <= start;
      t      <= '0;
    end else if (t == $bits(t)'(TOTAL)) begin
      active <= 1'b0;
    end else begin
      t <= t + 1'b1;
    end
  end
endmodule
