// tim_top_tb: end-to-end test of the transducer interface module at reduced
// timing parameters (16 clocks per UART bit, ADC clock = clk/4, short
// display periods).
//
// An ADC0808/0809 model stands in for the converter and sensors, and the
// testbench plays the PC: it decodes the serial output and sends bytes in.
// Checked:
//   - the stream starts with the three TEDS records, then lines
//     "Tn=dddd\r\n" for n = 1,2,3 in order, each value being the linear
//     conversion of that sensor's input (current or just replaced input);
//   - after the inputs change, the new values reach the PC;
//   - the seven-segment display shows each sensor number and its value;
//   - bytes from the PC come out of the Rx buffer in order, a burst larger
//     than the buffer raises rx_overflow, and a bad stop bit raises
//     rx_frame_err.
// Each mechanism is counted and a failure is counted for any that never
// happened: TEDS dump, reading lines, ADC conversions of every channel,
// transmit-buffer back-pressure (buffer full), received bytes, Rx overflow,
// frame error, display rotation through all sensors.
module tim_top_tb;
  import tim_pkg::*;

  localparam int CLK_HZ = 160_000, BAUD = 10_000, CPB = CLK_HZ / BAUD;
  localparam int NUM_CH = 3, RX_DEPTH = 4;
  localparam int FS [3] = '{500, 250, 100};
  string recs [3] = '{"T1 TEMPERATURE 0-500 C\r\n",
                      "T2 PRESSURE  0-250 kPa\r\n",
                      "T3 POSITION    0-100 %\r\n"};

  logic clk = 0, rst = 1;
  logic adc_clk, ale, start, oe, eoc;
  logic [2:0] addr;
  logic [7:0] adc_data;
  logic [7:0] vin [8];
  logic txd, rxd = 1;
  logic [7:0] rx_data;
  logic rx_avail, rx_pop = 0, rx_overflow, rx_frame_err;
  logic [6:0] seg;
  logic [3:0] an;

  int checks = 0, failures = 0;
  int n_teds = 0, n_lines = 0, n_full = 0, n_rx = 0, n_ovf = 0, n_ferr = 0, n_new = 0;
  bit shown [NUM_CH];

  always #5 clk = ~clk;

  tim_top #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .NUM_CH(NUM_CH), .ADC_CLK_DIV(4),
            .PULSE_CYC(4), .EOC_WAIT_CYC(40), .OE_CYC(4), .SCAN_CYC(2000), .TX_DEPTH(16),
            .RX_DEPTH(RX_DEPTH), .DIGIT_CYC(4), .SHOW_CYC(400)) dut (
    .clk, .rst, .adc_clk, .adc_addr(addr), .adc_ale(ale), .adc_start(start),
    .adc_oe(oe), .adc_eoc(eoc), .adc_data, .uart_txd(txd), .uart_rxd(rxd),
    .rx_data, .rx_avail, .rx_pop, .rx_overflow, .rx_frame_err, .seg, .an);

  adc0809_model adc (.adc_clk, .addr, .ale, .start, .oe, .eoc, .data(adc_data), .vin);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int conv(input int ch, input int c);
    return (2 * c * FS[ch] + 255) / 510;   // round(c * FS / 255)
  endfunction

  // ---------------- PC side: receive and parse the serial stream ----------
  byte_t rxq [$];
  initial begin
    byte_t b;
    @(negedge rst);
    forever begin
      @(negedge txd);
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = txd;
      end
      repeat (CPB) @(posedge clk);
      check(txd == 1, "stop bit on the serial output");
      rxq.push_back(b);
    end
  end

  function automatic byte_t get_byte();
    return rxq.pop_front();
  endfunction

  // allowed values per channel: conversion of the current and previous input
  int cur_val [NUM_CH], old_val [NUM_CH];

  initial begin : parser
    byte_t b;
    string line;
    @(negedge rst);
    for (int r = 0; r < NUM_CH; r++)
      for (int j = 0; j < 24; j++) begin
        wait (rxq.size() != 0);
        b = get_byte();
        check(b == recs[r][j], $sformatf("TEDS %0d byte %0d: %02x expected %02x", r, j, b, recs[r][j]));
        n_teds++;
      end
    forever begin
      for (int ch = 0; ch < NUM_CH; ch++) begin
        int v;
        line = "";
        for (int j = 0; j < 9; j++) begin
          wait (rxq.size() != 0);
          b = get_byte();
          line = {line, string'(b)};
        end
        v = line.substr(3, 6).atoi();
        check(line.substr(0, 2) == $sformatf("T%0d=", ch + 1) && line.substr(7, 8) == "\r\n",
              $sformatf("line format '%s'", line));
        check(v == cur_val[ch] || v == old_val[ch],
              $sformatf("sensor %0d reads %0d, expected %0d or %0d", ch + 1, v, cur_val[ch], old_val[ch]));
        if (v == cur_val[ch] && cur_val[ch] != old_val[ch]) n_new++;
        n_lines++;
      end
    end
  end

  // ---------------- PC side: send bytes ----------------------------------
  task automatic pc_send(input byte_t b, input bit stop);
    @(negedge clk);
    rxd = 0; repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (CPB) @(negedge clk); end
    rxd = stop; repeat (CPB) @(negedge clk);
    rxd = 1; repeat (2 * CPB) @(negedge clk);
  endtask

  // ---------------- event counters --------------------------------------
  always @(posedge clk) if (!rst) begin
    if (dut.tx_full) n_full++;
    if (rx_overflow) n_ovf++;
    if (rx_frame_err) n_ferr++;
  end

  // ---------------- display decoding -------------------------------------
  function automatic int seg_to_int(input logic [6:0] s);
    case (~s)
      7'b0111111: return 0;  7'b0000110: return 1;  7'b1011011: return 2;
      7'b1001111: return 3;  7'b1100110: return 4;  7'b1101101: return 5;
      7'b1111101: return 6;  7'b0000111: return 7;  7'b1111111: return 8;
      7'b1101111: return 9;  default:    return -1;
    endcase
  endfunction

  // read the four digits once (left to right), waiting for each to light
  task automatic read_display(output int d3, output int d2, output int d1, output int d0);
    int d [4];
    logic [2:0] ch0;
    ch0 = dut.u_disp.shown_ch;
    for (int p = 3; p >= 0; p--) begin
      while (an != ~(4'b1 << p)) @(negedge clk);
      d[p] = seg_to_int(seg);
      @(negedge clk);
    end
    d3 = d[3]; d2 = d[2]; d1 = d[1]; d0 = d[0];
    if (dut.u_disp.shown_ch != ch0) d3 = -1;   // rotated during the read
  endtask

  task automatic set_inputs(input bit extremes);
    for (int i = 0; i < 8; i++) vin[i] = extremes ? ((i % 2 != 0) ? 8'hff : 8'h00) : 8'($urandom);
    for (int ch = 0; ch < NUM_CH; ch++) begin
      old_val[ch] = cur_val[ch];
      cur_val[ch] = conv(ch, int'(vin[ch]));
    end
  endtask

  initial begin
    int d3, d2, d1, d0, lines_before;
    set_inputs(0);
    for (int ch = 0; ch < NUM_CH; ch++) old_val[ch] = cur_val[ch];
    repeat (5) @(posedge clk);
    rst <= 0;

    // 1. TEDS and the first readings
    wait (n_lines >= 3 * NUM_CH);

    // 2. PC sends bytes; they come out of the Rx buffer in order
    for (int k = 0; k < 3; k++) pc_send(8'h41 + 8'(k), 1'b1);
    for (int k = 0; k < 3; k++) begin
      check(rx_avail && rx_data == 8'h41 + 8'(k), $sformatf("Rx buffer byte %0d = %02x", k, rx_data));
      @(negedge clk); rx_pop = 1; @(negedge clk); rx_pop = 0;
      n_rx++;
    end
    check(!rx_avail, "Rx buffer empty after reading");

    // 3. burst larger than the Rx buffer -> overflow; then drain
    for (int k = 0; k < RX_DEPTH + 1; k++) pc_send(8'(k), 1'b1);
    for (int k = 0; k < RX_DEPTH; k++) begin
      check(rx_avail && rx_data == 8'(k), "Rx buffer contents after overflow");
      @(negedge clk); rx_pop = 1; @(negedge clk); rx_pop = 0;
    end

    // 4. bad stop bit
    pc_send(8'h55, 1'b0);
    repeat (2 * CPB) @(negedge clk);

    // 5. inputs change (full scale and zero, then random); new values must arrive
    for (int k = 0; k < 3; k++) begin
      lines_before = n_lines;
      set_inputs(k == 0);
      wait (n_lines >= lines_before + 3 * NUM_CH);
      // once a whole later frame is through, old values are no longer allowed
      for (int ch = 0; ch < NUM_CH; ch++) old_val[ch] = cur_val[ch];
      wait (n_lines >= lines_before + 6 * NUM_CH);
    end

    // 6. display: every sensor number with its value
    for (int k = 0; k < 3 * NUM_CH; k++) begin
      read_display(d3, d2, d1, d0);
      if (d3 < 0) read_display(d3, d2, d1, d0);
      check(d3 >= 1 && d3 <= NUM_CH, $sformatf("sensor digit %0d", d3));
      if (d3 >= 1 && d3 <= NUM_CH) begin
        check(d2 * 100 + d1 * 10 + d0 == cur_val[d3 - 1] % 1000,
              $sformatf("display T%0d shows %0d%0d%0d, expected %0d", d3, d2, d1, d0, cur_val[d3 - 1]));
        shown[d3 - 1] = 1;
      end
      repeat (150) @(negedge clk);
    end

    // mechanisms
    check(n_teds == 72, $sformatf("TEDS bytes %0d", n_teds));
    check(n_lines >= 3 * NUM_CH, "reading lines");
    check(n_new >= NUM_CH, $sformatf("new values reached the PC %0d times", n_new));
    check(adc.conversions > 10 * NUM_CH, "ADC conversions");
    check(adc.protocol_errors == 0, "ADC protocol errors");
    check(n_full > 0, "transmit buffer back-pressure");
    check(n_rx == 3, "bytes received from the PC");
    check(n_ovf > 0, "Rx overflow");
    check(n_ferr == 1, $sformatf("frame errors %0d", n_ferr));
    check(shown[0] && shown[1] && shown[2], "display rotation");
    $display("mechanisms: teds_bytes=%0d lines=%0d new_values=%0d adc_conversions=%0d tx_full_cycles=%0d rx_bytes=%0d rx_overflows=%0d frame_errors=%0d",
             n_teds, n_lines, n_new, adc.conversions, n_full, n_rx, n_ovf, n_ferr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
