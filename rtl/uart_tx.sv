// uart_tx: asynchronous serial transmitter (RS-232 framing, 8N1).
//
// A byte accepted with valid && ready is sent LSB first as one start bit
// (0), eight data bits and one stop bit (1), each CLKS_PER_BIT clocks long.
// ready is high while the transmitter is idle. The line idles high.
// Timing: a frame lasts 10 * CLKS_PER_BIT clocks; the start bit begins the
// clock after the byte is accepted, and ready returns at the end of the stop
// bit. The default divides a 50 MHz clock down to 9600 baud.
// RS-232 style serial output follows the design; frame format, baud rate and
// the valid/ready handshake are this implementation's choice.
module uart_tx #(
  parameter int CLKS_PER_BIT = 5208
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       valid,
  input  logic [7:0] data,
  output logic       ready,
  output logic       txd
);

  localparam int CW = $clog2(CLKS_PER_BIT + 1);

  logic [9:0]    shreg;     // stop, data[7:0], start
  logic [3:0]    bits_left;
  logic [CW-1:0] cnt;
  logic          busy;

  assign ready = !busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      shreg     <= '1;
      bits_left <= '0;
      cnt       <= '0;
      txd       <= 1'b1;
    end else if (!busy) begin
      txd <= 1'b1;
      if (valid) begin
        busy      <= 1'b1;
        shreg     <= {1'b1, data, 1'b0};
        bits_left <= 4'd10;
        cnt       <= '0;
      end
    end else begin
      if (cnt == '0) begin
        if (bits_left == '0) begin
          busy <= 1'b0;
          txd  <= 1'b1;
        end else begin
          txd       <= shreg[0];
          shreg     <= {1'b1, shreg[9:1]};
          bits_left <= bits_left - 1'b1;
          cnt       <= CW'(CLKS_PER_BIT - 1);
        end
      end else begin
        cnt <= cnt - 1'b1;
      end
    end
  end

  initial assert (CLKS_PER_BIT >= 2) else $error("CLKS_PER_BIT must be at least 2");

endmodule
