// uart_rx: asynchronous serial receiver (RS-232 framing, 8N1).
//
// The line is synchronised with two flip-flops. A falling edge on the idle
// line starts a frame (a line held low after a bad stop bit does not); the start bit is checked half a bit later, then each
// data bit is sampled in the middle of its bit time, LSB first, and the stop
// bit is checked. valid pulses for one clock with the byte when the stop bit
// is high; frame_err pulses instead when it is low. A start bit that is not
// still low at mid-bit is taken as a glitch and ignored.
// Timing: valid comes about 9.5 bit times after the start edge.
// Receiving from the PC (duplex operation) follows the design; the framing
// and the oversampling method are this implementation's choice.
module uart_rx #(
  parameter int CLKS_PER_BIT = 5208
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rxd,
  output logic       valid,
  output logic [7:0] data,
  output logic       frame_err
);

  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} state_t;

  localparam int CW = $clog2(CLKS_PER_BIT + 1);

  state_t        state;
  logic [CW-1:0] cnt;
  logic [2:0]    bitn;
  logic          rx_q1, rx_q2, rx_q3;

  always_ff @(posedge clk) begin
    if (rst) begin
      rx_q1 <= 1'b1;
      rx_q2 <= 1'b1;
      rx_q3 <= 1'b1;
    end else begin
      rx_q1 <= rxd;
      rx_q2 <= rx_q1;
      rx_q3 <= rx_q2;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= R_IDLE;
      cnt       <= '0;
      bitn      <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      valid     <= 1'b0;
      frame_err <= 1'b0;
      case (state)
        R_IDLE: begin
          if (!rx_q2 && rx_q3) begin   // falling edge
            cnt   <= CW'(CLKS_PER_BIT / 2 - 1);
            state <= R_START;
          end
        end
        R_START: begin
          if (cnt == '0) begin
            if (!rx_q2) begin
              cnt   <= CW'(CLKS_PER_BIT - 1);
              bitn  <= '0;
              state <= R_DATA;
            end else begin
              state <= R_IDLE;
            end
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        R_DATA: begin
          if (cnt == '0) begin
            data <= {rx_q2, data[7:1]};
            cnt  <= CW'(CLKS_PER_BIT - 1);
            if (bitn == 3'd7) state <= R_STOP;
            bitn <= bitn + 1'b1;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        default: begin  // R_STOP
          if (cnt == '0) begin
            valid     <= rx_q2;
            frame_err <= !rx_q2;
            state     <= R_IDLE;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
      endcase
    end
  end

  initial assert (CLKS_PER_BIT >= 4) else $error("CLKS_PER_BIT must be at least 4");

endmodule
