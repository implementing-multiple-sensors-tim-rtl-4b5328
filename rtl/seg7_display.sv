// seg7_display: multiplexed four-digit seven-segment display driver.
//
// The display shows one sensor at a time and moves to the next every
// SHOW_CYC clocks: the leftmost digit holds the sensor number (1..NUM_CH),
// the other three the hundreds, tens and units of its mapped reading
// (a reading above 999 shows its last three digits). Before the first
// reading arrives every digit shows a dash. The four digits share one set of
// segment lines and are lit in turn for DIGIT_CYC clocks each.
// Interface: seg = {g,f,e,d,c,b,a} and an (an[0] = rightmost digit) are
// active low, as on common-anode boards; shown_ch is the sensor shown.
// Timing: defaults give 1 ms per digit and 1 s per sensor at 50 MHz.
// Seven-segment output of the readings on at least four digits follows the
// design; cycling through the sensors and the digit layout are this
// implementation's choices.
module seg7_display
  import tim_pkg::*;
#(
  parameter int NUM_CH    = 3,
  parameter int DIGIT_CYC = 50_000,
  parameter int SHOW_CYC  = 50_000_000
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [MAP_W-1:0]      reading [NUM_CH],
  input  logic                  reading_valid,
  output logic [6:0]            seg,
  output logic [3:0]            an,
  output logic [ADC_ADDR_W-1:0] shown_ch
);

  localparam int DCW = $clog2(DIGIT_CYC + 1);
  localparam int SCW = $clog2(SHOW_CYC + 1);

  logic [DCW-1:0] dcnt;
  logic [SCW-1:0] scnt;
  logic [1:0]     pos;
  logic [3:0]     dig [DEC_DIGITS];
  byte_t          asc [DEC_DIGITS];
  logic [3:0]     nib;

  logic [MAP_W-1:0] shown_val;

  always_comb begin
    shown_val = '0;
    for (int i = 0; i < NUM_CH; i++)
      if (shown_ch == ADC_ADDR_W'(i)) shown_val = reading[i];
  end

  value_decoder u_dec (.value(shown_val), .digit(dig), .ascii(asc));

  always_ff @(posedge clk) begin
    if (rst) begin
      dcnt     <= '0;
      scnt     <= '0;
      pos      <= '0;
      shown_ch <= '0;
    end else begin
      if (dcnt == DCW'(DIGIT_CYC - 1)) begin
        dcnt <= '0;
        pos  <= pos + 1'b1;
      end else begin
        dcnt <= dcnt + 1'b1;
      end
      if (scnt == SCW'(SHOW_CYC - 1)) begin
        scnt     <= '0;
        shown_ch <= (shown_ch == ADC_ADDR_W'(NUM_CH - 1)) ? '0 : shown_ch + 1'b1;
      end else begin
        scnt <= scnt + 1'b1;
      end
    end
  end

  always_comb begin
    nib = (pos == 2'd3) ? 4'(shown_ch) + 4'd1 : dig[pos];
    an  = ~(4'b0001 << pos);
    if (!reading_valid) begin
      seg = ~7'h40;                 // dash
    end else begin
      case (nib)
        4'd0:    seg = ~7'h3f;
        4'd1:    seg = ~7'h06;
        4'd2:    seg = ~7'h5b;
        4'd3:    seg = ~7'h4f;
        4'd4:    seg = ~7'h66;
        4'd5:    seg = ~7'h6d;
        4'd6:    seg = ~7'h7d;
        4'd7:    seg = ~7'h07;
        4'd8:    seg = ~7'h7f;
        4'd9:    seg = ~7'h6f;
        default: seg = ~7'h40;
      endcase
    end
  end

endmodule
