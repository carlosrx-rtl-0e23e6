// rs232_if: RS232 debug port of the main FPGA.
//
// A UART (8N1) receives one-byte commands from a PC and answers through the
// transmitter:
//   'R' (0x52)       soft_rst pulse: resets the readout logic
//   'T' (0x54)       sw_trig pulse: starts a local trigger sequence
//   'S' (0x53)       sends the 64-bit status word, 8 bytes, MSB first
//   'E' (0x45) h l   mask_wr with mask_data = {h[3:0], l}: channel enables
//   'P' (0x50)       toggles spy mode
// In spy mode, whenever the transmitter is free and no status reply is being
// sent, the next word seen on the DAQ output (spy_valid) is captured and sent
// as 4 bytes, MSB first; words passing meanwhile are not sent, so the spy
// samples the stream without slowing it. Other bytes are ignored. A reset and
// a trigger command, status monitoring of buffers and external FIFOs, and
// spying the DAQ data come from the readout; the byte codes, the baud rate
// and the reply formats are this design's choices.
module rs232_if #(
  parameter int unsigned CLKS_PER_BIT = 348
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rx,
  output logic        tx,
  input  logic [63:0] status,
  input  logic [31:0] spy_word,
  input  logic        spy_valid,
  output logic        soft_rst,
  output logic        sw_trig,
  output logic        mask_wr,
  output logic [11:0] mask_data,
  output logic        spy_on
);
  typedef enum logic [1:0] {C_CMD, C_MASK_HI, C_MASK_LO} cstate_t;

  cstate_t     cstate;
  logic [7:0]  rx_data;
  logic        rx_valid;
  logic        tx_start, tx_busy;
  logic [63:0] shreg;
  logic [3:0]  nbytes;
  logic [3:0]  mask_hi;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (.clk, .rst_n, .rx, .data(rx_data), .valid(rx_valid));
  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (.clk, .rst_n, .data(shreg[63:56]), .start(tx_start), .tx, .busy(tx_busy));

  // a byte is started when the transmitter is free and did not start last clock
  logic tx_start_q;
  assign tx_start = (nbytes != '0) && !tx_busy && !tx_start_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cstate     <= C_CMD;
      soft_rst   <= 1'b0;
      sw_trig    <= 1'b0;
      mask_wr    <= 1'b0;
      mask_data  <= '0;
      mask_hi    <= '0;
      spy_on     <= 1'b0;
      shreg      <= '0;
      nbytes     <= '0;
      tx_start_q <= 1'b0;
    end else begin
      soft_rst   <= 1'b0;
      sw_trig    <= 1'b0;
      mask_wr    <= 1'b0;
      tx_start_q <= tx_start;

      // transmit queue
      if (tx_start) begin
        shreg  <= {shreg[55:0], 8'h00};
        nbytes <= nbytes - 1'b1;
      end

      // command decoder
      if (rx_valid) begin
        unique case (cstate)
          C_CMD: begin
            unique case (rx_data)
              8'h52: soft_rst <= 1'b1;
              8'h54: sw_trig  <= 1'b1;
              8'h50: spy_on   <= !spy_on;
              8'h45: cstate   <= C_MASK_HI;
              8'h53: if (nbytes == '0 && !tx_busy) begin
                shreg  <= status;
                nbytes <= 4'd8;
              end
              default: ;
            endcase
          end
          C_MASK_HI: begin
            mask_hi <= rx_data[3:0];
            cstate  <= C_MASK_LO;
          end
          default: begin
            mask_data <= {mask_hi, rx_data};
            mask_wr   <= 1'b1;
            cstate    <= C_CMD;
          end
        endcase
      end else if (spy_on && spy_valid && nbytes == '0 && !tx_busy && !tx_start_q) begin
        shreg  <= {spy_word, 32'h0};
        nbytes <= 4'd4;
      end
    end
  end
endmodule
