// tim_controller: main controller of the transducer interface module.
//
// It runs the process flow of the TIM. After reset it reads the TEDS record
// of every transducer from the TEDS ROM, byte by byte, and queues the bytes
// in the UART transmit buffer. Then it loops: it waits until the sample
// registers hold a fresh sample of every channel, takes a snapshot of them
// and clears the fresh flags, and for each channel looks the raw code up in
// the conversion ROM, decodes the mapped value to decimal ASCII and queues
// the line "Tn=dddd\r\n" (n = 1..NUM_CH, four digits). The mapped values are
// also kept in reading[] for the seven-segment display.
// Back-pressure: a byte is pushed only while the transmit buffer is not
// full; the controller waits otherwise, so no byte is lost.
// Timing: both ROMs are read synchronously (one clock); a TEDS byte takes
// two clocks plus any wait, a reading line one ROM clock plus 9 pushes.
// The order of the steps (TEDS, mapping, decoding, UART) follows the design;
// sending the TEDS once after reset and the text format of a reading line
// are this implementation's choices.
module tim_controller
  import tim_pkg::*;
#(
  parameter int NUM_CH   = 3,
  localparam int TEDS_AW = $clog2(NUM_CH * TEDS_LEN)
) (
  input  logic                  clk,
  input  logic                  rst,
  // sample registers
  input  logic [ADC_W-1:0]      code [NUM_CH],
  input  logic                  all_fresh,
  output logic                  clear_fresh,
  // conversion ROM
  output logic                  map_en,
  output logic [ADC_ADDR_W-1:0] map_ch,
  output logic [ADC_W-1:0]      map_code,
  input  logic [MAP_W-1:0]      mapped,
  // TEDS ROM
  output logic                  teds_en,
  output logic [TEDS_AW-1:0]    teds_addr,
  input  byte_t                 teds_data,
  // UART transmit buffer
  output logic                  tx_push,
  output byte_t                 tx_data,
  input  logic                  tx_full,
  // readings for the display
  output logic [MAP_W-1:0]      reading [NUM_CH],
  output logic                  reading_valid,
  output logic                  teds_done
);

  localparam int LINE_LEN = 9;   // "Tn=dddd\r\n"
  localparam int TEDS_END = NUM_CH * TEDS_LEN - 1;

  typedef enum logic [2:0] {C_TEDS_RD, C_TEDS_WAIT, C_TEDS_PUSH, C_SCAN, C_MAP, C_MAP_WAIT, C_LINE} state_t;

  state_t                state;
  logic [ADC_W-1:0]      snap [NUM_CH];
  logic [ADC_ADDR_W-1:0] ch;
  logic [3:0]            idx;
  logic [MAP_W-1:0]      val_q;
  logic [3:0]            dig [DEC_DIGITS];
  byte_t                 asc [DEC_DIGITS];
  byte_t                 line_byte;

  value_decoder u_dec (.value(val_q), .digit(dig), .ascii(asc));

  always_comb begin
    case (idx)
      4'd0:    line_byte = "T";
      4'd1:    line_byte = 8'h31 + 8'(ch);
      4'd2:    line_byte = "=";
      4'd3:    line_byte = asc[3];
      4'd4:    line_byte = asc[2];
      4'd5:    line_byte = asc[1];
      4'd6:    line_byte = asc[0];
      4'd7:    line_byte = 8'h0d;
      default: line_byte = 8'h0a;
    endcase
  end

  assign teds_en     = (state == C_TEDS_RD);
  assign map_en      = (state == C_MAP);
  assign map_ch      = ch;
  always_comb begin
    map_code = '0;
    for (int i = 0; i < NUM_CH; i++)
      if (ch == ADC_ADDR_W'(i)) map_code = snap[i];
  end
  assign clear_fresh = (state == C_SCAN) && all_fresh;
  assign tx_push     = ((state == C_TEDS_PUSH) || (state == C_LINE)) && !tx_full;
  assign tx_data     = (state == C_TEDS_PUSH) ? teds_data : line_byte;

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= C_TEDS_RD;
      teds_addr     <= '0;
      ch            <= '0;
      idx           <= '0;
      val_q         <= '0;
      reading_valid <= 1'b0;
      teds_done     <= 1'b0;
      for (int i = 0; i < NUM_CH; i++) begin
        snap[i]    <= '0;
        reading[i] <= '0;
      end
    end else begin
      case (state)
        C_TEDS_RD:   state <= C_TEDS_WAIT;
        C_TEDS_WAIT: state <= C_TEDS_PUSH;
        C_TEDS_PUSH: begin
          if (!tx_full) begin
            if (teds_addr == TEDS_AW'(TEDS_END)) begin
              teds_done <= 1'b1;
              state     <= C_SCAN;
            end else begin
              teds_addr <= teds_addr + 1'b1;
              state     <= C_TEDS_RD;
            end
          end
        end
        C_SCAN: begin
          if (all_fresh) begin
            for (int i = 0; i < NUM_CH; i++) snap[i] <= code[i];
            ch    <= '0;
            state <= C_MAP;
          end
        end
        C_MAP:      state <= C_MAP_WAIT;
        C_MAP_WAIT: begin
          val_q       <= mapped;
          for (int i = 0; i < NUM_CH; i++)
            if (ch == ADC_ADDR_W'(i)) reading[i] <= mapped;
          idx         <= '0;
          state       <= C_LINE;
        end
        default: begin  // C_LINE
          if (!tx_full) begin
            if (idx == 4'(LINE_LEN - 1)) begin
              if (ch == ADC_ADDR_W'(NUM_CH - 1)) begin
                reading_valid <= 1'b1;
                state         <= C_SCAN;
              end else begin
                ch    <= ch + 1'b1;
                state <= C_MAP;
              end
            end else begin
              idx <= idx + 1'b1;
            end
          end
        end
      endcase
    end
  end

endmodule
