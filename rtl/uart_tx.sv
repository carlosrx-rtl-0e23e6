// uart_tx: 8N1 serial transmitter for the RS232 port.
//
// A start pulse with the byte loads a ten-bit frame (start bit, eight data
// bits LSB first, stop bit) that is shifted out, one bit every CLKS_PER_BIT
// clocks. busy is high from the clock after start until the stop bit has been
// sent; a start while busy is ignored. The line idles high.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 348
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       start,
  output logic       tx,
  output logic       busy
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);
  logic [9:0]    frame;
  logic [3:0]    nbits;
  logic [CW-1:0] cnt;

  assign tx = frame[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame <= '1; nbits <= '0; cnt <= '0; busy <= 1'b0;
    end else if (!busy) begin
      if (start) begin
        frame <= {1'b1, data, 1'b0};
        nbits <= 4'd10;
        cnt   <= '0;
        busy  <= 1'b1;
      end
    end else if (cnt == CW'(CLKS_PER_BIT - 1)) begin
      cnt   <= '0;
      frame <= {1'b1, frame[9:1]};
      nbits <= nbits - 1'b1;
      if (nbits == 4'd1) busy <= 1'b0;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end
endmodule
