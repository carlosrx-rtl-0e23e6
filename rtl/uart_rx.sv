// uart_rx: 8N1 serial receiver for the RS232 port.
//
// The line is synchronised through two flip-flops. A falling edge starts a
// frame; the start bit is confirmed in its middle, then each of the eight data
// bits (LSB first) is sampled in the middle of its bit time, CLKS_PER_BIT
// system clocks long. A byte whose stop bit is high is delivered with a
// one-clock valid pulse; a frame with a low stop bit is discarded.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 348
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,
  output logic [7:0] data,
  output logic       valid
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);
  typedef enum logic [1:0] {S_IDLE, S_START, S_BITS, S_STOP} state_t;

  state_t      state;
  logic [CW-1:0] cnt;
  logic [2:0]  bitn;
  logic [7:0]  sh;
  logic        rx_s1, rx_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_s1 <= 1'b1; rx_s <= 1'b1;
      state <= S_IDLE; cnt <= '0; bitn <= '0; sh <= '0;
      data  <= '0; valid <= 1'b0;
    end else begin
      rx_s1 <= rx;
      rx_s  <= rx_s1;
      valid <= 1'b0;
      unique case (state)
        S_IDLE: if (!rx_s) begin
          cnt   <= '0;
          state <= S_START;
        end
        S_START: begin
          if (cnt == CW'(CLKS_PER_BIT / 2)) begin
            cnt   <= '0;
            bitn  <= '0;
            state <= rx_s ? S_IDLE : S_BITS;
          end else cnt <= cnt + 1'b1;
        end
        S_BITS: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt  <= '0;
            sh   <= {rx_s, sh[7:1]};
            bitn <= bitn + 1'b1;
            if (bitn == 3'd7) state <= S_STOP;
          end else cnt <= cnt + 1'b1;
        end
        default: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            state <= S_IDLE;
            if (rx_s) begin
              data  <= sh;
              valid <= 1'b1;
            end
          end else cnt <= cnt + 1'b1;
        end
      endcase
    end
  end
endmodule
