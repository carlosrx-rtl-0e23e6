// idt_fifo_model: behavioural model of one large external FIFO chip, for
// simulation only (not part of the design).
//
// It stands for the commercial FIFOs between the input FPGAs and the main
// FPGA: a 32-bit word queue on one clock, written with wen while ff (full) is
// low and read first-word-fall-through (rdata shows the oldest word while ef,
// empty, is low; ren pops it). hf is high from half of DEPTH words on, paf
// (programmable almost full) from DEPTH - PAF_OFFSET words on. mrs_n empties
// it. The real part's depth is not modelled: DEPTH is chosen by the testbench.
module idt_fifo_model #(
  parameter int DEPTH      = 1024,
  parameter int PAF_OFFSET = 64
) (
  input  logic        clk,
  input  logic        mrs_n,
  input  logic        wen,
  input  logic [31:0] wdata,
  output logic        ff,
  input  logic        ren,
  output logic [31:0] rdata,
  output logic        ef,
  output logic        hf,
  output logic        paf,
  output int          level,
  output int          max_level
);
  logic [31:0] mem [DEPTH];
  int          rp = 0, wp = 0, n = 0;

  assign level = n;
  assign ff    = (n >= DEPTH);
  assign ef    = (n == 0);
  assign hf    = (n >= DEPTH / 2);
  assign paf   = (n >= DEPTH - PAF_OFFSET);
  assign rdata = (n != 0) ? mem[rp] : 32'h0;

  // inputs are sampled at the edge and the FIFO changes 1 ns later, so the
  // flags seen by the design at an edge are those from before it
  always @(posedge clk) begin
    bit          do_rst, do_w, do_r;
    logic [31:0] d;
    do_rst = !mrs_n; do_w = wen; do_r = ren; d = wdata;
    #1;
    if (do_rst) begin
      rp = 0; wp = 0; n = 0;
      max_level = 0;
    end else begin
      if (do_r && n != 0) begin rp = (rp + 1) % DEPTH; n--; end
      if (do_w && n < DEPTH) begin mem[wp] = d; wp = (wp + 1) % DEPTH; n++; end
      if (n > max_level) max_level = n;
    end
  end

  initial max_level = 0;
endmodule
