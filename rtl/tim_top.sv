// tim_top: transducer interface module (TIM) for multiple sensors on one FPGA.
//
// Three analog sensors (T1 temperature, T2 pressure, T3 potentiometer) feed
// an external ADC0808/0809. Inside the FPGA:
//   adc0809_if     samples the sensors every SCAN_CYC clocks through the ADC;
//   sample_regs    keeps the latest code of each sensor;
//   tim_controller sends the TEDS records from teds_rom after reset, then for
//                  every complete scan maps the codes through map_rom,
//                  decodes them to ASCII and queues "Tn=dddd\r\n" lines;
//   sync_fifo      Tx buffer in front of uart_tx, Rx buffer behind uart_rx;
//   uart_tx        sends the bytes to the PC (8N1, BAUD);
//   uart_rx        receives bytes from the PC into the Rx buffer, whose head
//                  is brought out (rx_*) for an actuator such as a relay;
//   seg7_display   shows the sensor number and reading on four digits.
// The block set and data flow follow the design's block diagram; the clock
// (50 MHz), baud rate (9600), sampling interval (10 ms), message formats,
// buffer depths and reset
// (synchronous, active high) are this implementation's choices.
module tim_top
  import tim_pkg::*;
#(
  parameter int CLK_HZ       = 50_000_000,
  parameter int BAUD         = 9600,
  parameter int NUM_CH       = 3,
  parameter int ADC_CLK_DIV  = 78,         // ~640 kHz ADC clock
  parameter int PULSE_CYC    = 16,
  parameter int EOC_WAIT_CYC = 1000,
  parameter int OE_CYC       = 16,
  parameter int SCAN_CYC     = CLK_HZ / 100,  // sensors sampled every 10 ms
  parameter int TX_DEPTH     = 16,
  parameter int RX_DEPTH     = 16,
  parameter int DIGIT_CYC    = CLK_HZ / 1000,  // 1 ms per digit
  parameter int SHOW_CYC     = CLK_HZ          // 1 s per sensor
) (
  input  logic                  clk,
  input  logic                  rst,
  // ADC0808/0809
  output logic                  adc_clk,
  output logic [ADC_ADDR_W-1:0] adc_addr,
  output logic                  adc_ale,
  output logic                  adc_start,
  output logic                  adc_oe,
  input  logic                  adc_eoc,
  input  logic [ADC_W-1:0]      adc_data,
  // serial link to the PC
  output logic                  uart_txd,
  input  logic                  uart_rxd,
  // received bytes (for a relay or other actuator)
  output logic [7:0]            rx_data,
  output logic                  rx_avail,
  input  logic                  rx_pop,
  output logic                  rx_overflow,
  output logic                  rx_frame_err,
  // seven-segment display
  output logic [6:0]            seg,
  output logic [3:0]            an
);

  localparam int CLKS_PER_BIT = CLK_HZ / BAUD;
  localparam int TEDS_AW      = $clog2(NUM_CH * TEDS_LEN);

  logic                  sample_valid;
  sample_t               sample;
  logic [ADC_W-1:0]      code [NUM_CH];
  logic [NUM_CH-1:0]     fresh;
  logic                  all_fresh, clear_fresh;
  logic                  map_en;
  logic [ADC_ADDR_W-1:0] map_ch;
  logic [ADC_W-1:0]      map_code;
  logic [MAP_W-1:0]      mapped;
  logic                  teds_en;
  logic [TEDS_AW-1:0]    teds_addr;
  byte_t                 teds_data;
  logic                  tx_push, tx_full, tx_empty, tx_ready;
  byte_t                 tx_wdata, tx_rdata;
  logic [MAP_W-1:0]      reading [NUM_CH];
  logic                  reading_valid, teds_done;
  logic                  rx_valid, rx_empty;
  byte_t                 rx_byte;
  logic [ADC_ADDR_W-1:0] shown_ch;

  adc0809_if #(
    .NUM_CH(NUM_CH), .ADC_CLK_DIV(ADC_CLK_DIV), .PULSE_CYC(PULSE_CYC),
    .EOC_WAIT_CYC(EOC_WAIT_CYC), .OE_CYC(OE_CYC), .SCAN_CYC(SCAN_CYC)
  ) u_adc (
    .clk, .rst, .adc_clk, .adc_addr, .adc_ale, .adc_start, .adc_oe, .adc_eoc,
    .adc_data, .sample_valid, .sample
  );

  sample_regs #(.NUM_CH(NUM_CH)) u_regs (
    .clk, .rst, .sample_valid, .sample, .clear_fresh, .code, .fresh, .all_fresh
  );

  map_rom #(.NUM_CH(NUM_CH)) u_map (
    .clk, .en(map_en), .addr_ch(map_ch), .addr_code(map_code), .mapped
  );

  teds_rom #(.NUM_CH(NUM_CH)) u_teds (
    .clk, .en(teds_en), .addr(teds_addr), .data(teds_data)
  );

  tim_controller #(.NUM_CH(NUM_CH)) u_ctrl (
    .clk, .rst, .code, .all_fresh, .clear_fresh,
    .map_en, .map_ch, .map_code, .mapped,
    .teds_en, .teds_addr, .teds_data,
    .tx_push, .tx_data(tx_wdata), .tx_full,
    .reading, .reading_valid, .teds_done
  );

  sync_fifo #(.WIDTH(8), .DEPTH(TX_DEPTH)) u_txbuf (
    .clk, .rst, .push(tx_push), .wdata(tx_wdata), .pop(tx_ready && !tx_empty),
    .rdata(tx_rdata), .full(tx_full), .empty(tx_empty), .count(), .overflow()
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst, .valid(!tx_empty), .data(tx_rdata), .ready(tx_ready), .txd(uart_txd)
  );

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst, .rxd(uart_rxd), .valid(rx_valid), .data(rx_byte), .frame_err(rx_frame_err)
  );

  sync_fifo #(.WIDTH(8), .DEPTH(RX_DEPTH)) u_rxbuf (
    .clk, .rst, .push(rx_valid), .wdata(rx_byte), .pop(rx_pop),
    .rdata(rx_data), .full(), .empty(rx_empty), .count(), .overflow(rx_overflow)
  );

  assign rx_avail = !rx_empty;

  seg7_display #(.NUM_CH(NUM_CH), .DIGIT_CYC(DIGIT_CYC), .SHOW_CYC(SHOW_CYC)) u_disp (
    .clk, .rst, .reading, .reading_valid, .seg, .an, .shown_ch
  );

endmodule
