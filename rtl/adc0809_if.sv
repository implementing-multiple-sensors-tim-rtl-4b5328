// adc0809_if: data conversion and acquisition front end for an ADC0808/0809.
//
// The block samples the sensors at fixed intervals: every SCAN_CYC clocks it
// converts channels 0..NUM_CH-1 of the external eight-channel ADC one after
// the other and delivers one 8-bit sample per conversion. For each
// channel it drives the address, pulses ALE and START together (ALE latches
// the address, the falling edge of START begins the conversion), waits until
// the converter has had time to pull EOC low, waits for EOC to return high,
// then raises OE, lets the data settle and captures ADC_DATA.
// It also generates the ADC clock by dividing the system clock.
//
// Interface: adc_* pins go to the converter; sample_valid pulses for one
// clock with sample.ch / sample.code.
// Timing: one conversion takes PULSE_CYC + EOC_WAIT_CYC + the ADC's own
// conversion time (about 64 ADC clocks on an ADC0809) + OE_CYC + a few
// clocks; scans start SCAN_CYC clocks apart (10 ms, 100 samples per second
// per sensor, by default), or back to back if a scan is longer than that.
//
// The use of an ADC0808/0809 and sampling at predefined intervals follow the
// design; the interval, the pin
// sequence and the default timings (ADC clock about 640 kHz from a 50 MHz
// clock, 320 ns pulses) come from the converter's usual datasheet timing and
// are this implementation's choice. Reset is synchronous, active high.
module adc0809_if
  import tim_pkg::*;
#(
  parameter int NUM_CH       = 3,    // sensors connected to IN0..IN(NUM_CH-1)
  parameter int ADC_CLK_DIV  = 78,   // system clocks per ADC clock period (>= 2)
  parameter int PULSE_CYC    = 16,   // ALE/START high time, system clocks
  parameter int EOC_WAIT_CYC = 1000, // START fall to first EOC poll, system clocks
  parameter int OE_CYC       = 16,   // OE high to data capture, system clocks
  parameter int SCAN_CYC     = 500_000 // clocks from one scan start to the next
) (
  input  logic                  clk,
  input  logic                  rst,
  // ADC pins
  output logic                  adc_clk,
  output logic [ADC_ADDR_W-1:0] adc_addr,
  output logic                  adc_ale,
  output logic                  adc_start,
  output logic                  adc_oe,
  input  logic                  adc_eoc,
  input  logic [ADC_W-1:0]      adc_data,
  // converted samples
  output logic                  sample_valid,
  output sample_t               sample
);

  typedef enum logic [2:0] {S_IDLE, S_ADDR, S_PULSE, S_WAIT, S_EOC, S_OE, S_NEXT} state_t;

  localparam int CW = $clog2(EOC_WAIT_CYC + PULSE_CYC + OE_CYC + ADC_CLK_DIV + 2);
  localparam int TW = $clog2(SCAN_CYC + 1);

  state_t                state;
  logic [CW-1:0]         cnt;
  logic [ADC_ADDR_W-1:0] ch;
  logic [CW-1:0]         div_cnt;
  logic                  eoc_q1, eoc_q2;
  logic [TW-1:0]         scan_tmr;
  logic                  scan_due;

  // Scan timer: a new scan of all channels is due every SCAN_CYC clocks.
  // If a scan takes longer than that, the next one starts as soon as it ends.
  always_ff @(posedge clk) begin
    if (rst) begin
      scan_tmr <= '0;
      scan_due <= 1'b1;
    end else begin
      if (scan_tmr == TW'(SCAN_CYC - 1)) begin
        scan_tmr <= '0;
        scan_due <= 1'b1;
      end else begin
        scan_tmr <= scan_tmr + 1'b1;
        if (state == S_IDLE && scan_due) scan_due <= 1'b0;
      end
    end
  end

  // ADC clock: high for the first half of each ADC_CLK_DIV period.
  always_ff @(posedge clk) begin
    if (rst) begin
      div_cnt <= '0;
      adc_clk <= 1'b0;
    end else begin
      div_cnt <= (div_cnt == CW'(ADC_CLK_DIV - 1)) ? '0 : div_cnt + 1'b1;
      adc_clk <= (div_cnt < CW'(ADC_CLK_DIV / 2));
    end
  end

  // EOC comes from outside the clock domain: synchronise it.
  always_ff @(posedge clk) begin
    if (rst) begin
      eoc_q1 <= 1'b0;
      eoc_q2 <= 1'b0;
    end else begin
      eoc_q1 <= adc_eoc;
      eoc_q2 <= eoc_q1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= S_IDLE;
      cnt          <= '0;
      ch           <= '0;
      adc_ale      <= 1'b0;
      adc_start    <= 1'b0;
      adc_oe       <= 1'b0;
      sample_valid <= 1'b0;
      sample       <= '0;
    end else begin
      sample_valid <= 1'b0;
      case (state)
        S_IDLE: begin                 // wait for the next sampling instant
          if (scan_due) state <= S_ADDR;
        end
        S_ADDR: begin                 // address set up one clock before ALE
          adc_ale   <= 1'b1;
          adc_start <= 1'b1;
          cnt       <= '0;
          state     <= S_PULSE;
        end
        S_PULSE: begin
          if (cnt == CW'(PULSE_CYC - 1)) begin
            adc_ale   <= 1'b0;
            adc_start <= 1'b0;        // falling edge starts the conversion
            cnt       <= '0;
            state     <= S_WAIT;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_WAIT: begin                 // give the ADC time to drop EOC
          if (cnt == CW'(EOC_WAIT_CYC - 1)) begin
            cnt   <= '0;
            state <= S_EOC;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_EOC: begin
          if (eoc_q2) begin
            adc_oe <= 1'b1;
            state  <= S_OE;
          end
        end
        S_OE: begin
          if (cnt == CW'(OE_CYC - 1)) begin
            sample_valid <= 1'b1;
            sample.ch    <= ch;
            sample.code  <= adc_data;
            adc_oe       <= 1'b0;
            cnt          <= '0;
            state        <= S_NEXT;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: begin                // S_NEXT: next channel, or end of scan
          if (ch == ADC_ADDR_W'(NUM_CH - 1)) begin
            ch    <= '0;
            state <= S_IDLE;
          end else begin
            ch    <= ch + 1'b1;
            state <= S_ADDR;
          end
        end
      endcase
    end
  end

  assign adc_addr = ch;

  initial begin
    assert (NUM_CH >= 1 && NUM_CH <= ADC_CHANNELS) else $error("NUM_CH out of range");
    assert (ADC_CLK_DIV >= 2) else $error("ADC_CLK_DIV must be at least 2");
    assert (SCAN_CYC >= 2) else $error("SCAN_CYC must be at least 2");
  end

endmodule
