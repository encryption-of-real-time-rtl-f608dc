// uart_tx: asynchronous serial transmitter feeding the ZigBee radio
// module, 8 data bits, no parity, one stop bit, LSB first, line idle high.
//
// Each bit lasts round(CLK_HZ / BAUD) system clocks (5208 at 50 MHz and
// 9600 baud, 0.006 % fast), so a byte takes 10 bit times, 1.04 ms.
//
// Interface: valid / data / ready handshake; a byte is taken in a cycle
// where valid and ready are both high. ready is high only while the
// transmitter is idle, so there is no internal buffer: ready rises as the
// stop bit ends, and a stream of bytes goes out one per 10 bit times plus
// one clock. txd is registered.
// The 9600 baud rate is the radio module's; the frame format is this
// design's choice.
module uart_tx #(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned BAUD   = 9600
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid,
  input  logic [7:0] data,
  output logic       ready,
  output logic       txd
);

  localparam int unsigned DIV = (CLK_HZ + BAUD / 2) / BAUD;
  localparam int unsigned CW  = $clog2(DIV + 1);

  logic [CW-1:0] cnt;
  logic [3:0]    nbits;   // bits still to send, including the current one
  logic [8:0]    shreg;   // {stop, data} still to send after the current bit

  assign ready = (nbits == 4'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      nbits <= '0;
      shreg <= '1;
      txd   <= 1'b1;
    end else if (nbits == 4'd0) begin
      if (valid) begin
        txd   <= 1'b0;            // start bit
        shreg <= {1'b1, data};
        nbits <= 4'd10;
        cnt   <= '0;
      end
    end else if (cnt == CW'(DIV - 1)) begin
      cnt   <= '0;
      nbits <= nbits - 4'd1;
      txd   <= (nbits == 4'd1) ? 1'b1 : shreg[0];
      shreg <= {1'b1, shreg[8:1]};
    end else begin
      cnt <= cnt + CW'(1);
    end
  end

endmodule
