// carlosrx_pkg: constants, types and header-building functions shared by the
// CARLOSrx readout firmware.
//
// The board reads 12 CARLOS links. Each lateral (input) FPGA serves six of
// them and writes two 32-bit external FIFOs, so there are four external FIFOs
// with three channels each. The main FPGA reads the four FIFOs and sends
// events towards the DAQ, each preceded by the eight-word Common Data Header
// (CDH), whose field layout follows the ALICE CDH table. The fragment header
// written by the schedulers, the status-bit encoding, the CDH version and the
// sub-detector bit are this design's own choices.
package carlosrx_pkg;

  localparam int unsigned NUM_LINKS  = 12;  // CARLOS links per board
  localparam int unsigned NUM_EXT    = 4;   // external IDT FIFOs
  localparam int unsigned LINKS_PER_EXT = 3;  // channels per external FIFO / scheduler
  localparam int unsigned CDH_WORDS  = 8;   // 32-bit words of the Common Data Header

  // Marker in bits [31:28] of every fragment header in the external FIFOs.
  localparam logic [3:0] FRAG_MARK = 4'hA;

  // Trigger-sequence error bits (the four erroneous sequences the readout recognises).
  typedef struct packed {
    logic l2err;
    logic l1merr;
    logic l1err;
    logic l0err;
  } trig_err_t;

  // One event as seen by the trigger interface.
  typedef struct packed {
    logic        dummy;    // no data follows: erroneous sequence
    trig_err_t   err;
    logic [11:0] bc;       // bunch crossing at L0
    logic [23:0] orbit;    // orbit number at L0
    logic [9:0]  l1msg;    // L1 trigger message
    logic [49:0] classes;  // trigger classes from the L2 message
    logic [35:0] roi;      // region of interest from the L2 message
  } trig_desc_t;

  localparam int unsigned DESC_W = $bits(trig_desc_t);

  // Fragment header: [31:28] marker, [27] truncated, [23:20] channel,
  // [19:16] per-channel event count (mod 16), [15:0] length in 32-bit words.
  function automatic logic [31:0] frag_header(input logic [3:0] ch, input logic [3:0] evcnt,
                                              input logic trunc, input logic [15:0] len);
    return {FRAG_MARK, trunc, 3'b000, ch, evcnt, len};
  endfunction

  // Status & error field of the CDH (16 bits, placed at [27:12] of word 4).
  function automatic logic [15:0] cdh_status(input trig_desc_t d, input logic ovf);
    return {10'd0, ovf, d.dummy, d.err};
  endfunction

  // Word idx (0..7) of the Common Data Header.
  function automatic logic [31:0] cdh_word(input trig_desc_t d, input logic [2:0] idx,
                                           input logic [7:0] version, input logic [23:0] subdet,
                                           input logic [11:0] mini_id, input logic ovf);
    logic [31:0] w;
    unique case (idx)
      3'd0: w = 32'hFFFF_FFFF;                                   // block length: unknown
      3'd1: w = {version, d.l1msg, 2'b00, d.bc};                 // version | L1 msg | MBZ | event ID 1
      3'd2: w = {8'h00, d.orbit};                                // MBZ | event ID 2 (orbit)
      3'd3: w = {8'h00, subdet};                                 // block attributes | sub-detectors
      3'd4: w = {4'h0, cdh_status(d, ovf), mini_id};             // MBZ | status & errors | mini-event ID
      3'd5: w = d.classes[31:0];                                 // trigger classes low
      3'd6: w = {d.roi[3:0], 10'd0, d.classes[49:32]};           // ROI low | MBZ | classes high
      default: w = d.roi[35:4];                                  // ROI high
    endcase
    return w;
  endfunction

endpackage
