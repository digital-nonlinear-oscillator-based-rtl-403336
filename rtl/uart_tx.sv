// uart_tx: RS232 transmitter (8 data bits, no parity, 1 stop bit).
//
// Sends each accepted byte least-significant bit first, framed by a start
// bit (0) and a stop bit (1); the line idles at 1. A byte is accepted when
// valid_i and ready_o are both high; ready_o is high only while the
// transmitter is idle. Each bit lasts CLKS_PER_BIT clock cycles, so a byte
// occupies the line for 10 * CLKS_PER_BIT cycles and the next byte can be
// accepted on the cycle after the stop bit ends.
//
// The serial link to the host follows the published acquisition set-up;
// the frame format and the default bit time (115200 baud from a 400 MHz
// sampling clock) are this design's own choice.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 3472
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid_i,
  input  logic [7:0] data_i,
  output logic       ready_o,
  output logic       txd_o
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic [8:0]    frame;     // stop, data[7:0]; shifted out LSB first
  logic [3:0]    bits_left;
  logic [CW-1:0] tick;
  logic          busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      frame     <= '1;
      bits_left <= '0;
      tick      <= '0;
      txd_o     <= 1'b1;
    end else if (!busy) begin
      txd_o <= 1'b1;
      if (valid_i) begin
        busy      <= 1'b1;
        frame     <= {1'b1, data_i};
        bits_left <= 4'd10;
        tick      <= '0;
        txd_o     <= 1'b0;         // start bit goes out at once
      end
    end else if (tick == CW'(CLKS_PER_BIT - 1)) begin
      tick      <= '0;
      bits_left <= bits_left - 1'b1;
      frame     <= {1'b1, frame[8:1]};
      if (bits_left == 4'd1) begin
        busy  <= 1'b0;
        txd_o <= 1'b1;
      end else begin
        txd_o <= frame[0];
      end
    end else begin
      tick <= tick + 1'b1;
    end
  end

  assign ready_o = !busy;

endmodule
