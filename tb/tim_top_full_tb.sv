// tim_top_full_tb: one complete operation of the transducer interface
// module with every parameter at its default (50 MHz clock, 9600 baud,
// ADC clock about 640 kHz, 1 ms per display digit, 1 s per sensor).
//
// After reset the PC side must receive the three TEDS records and then one
// reading line per sensor with the linear conversion of the ADC model's
// inputs; the display, which shows sensor 1 during the first second, must
// show "1" and sensor 1's value. A few bytes sent by the PC must come out
// of the Rx buffer.
module tim_top_full_tb;
  import tim_pkg::*;

  localparam int CPB = 50_000_000 / 9600;
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
  byte_t rxq [$];
  int checks = 0, failures = 0;

  always #10 clk = ~clk;   // 50 MHz

  tim_top dut (
    .clk, .rst, .adc_clk, .adc_addr(addr), .adc_ale(ale), .adc_start(start),
    .adc_oe(oe), .adc_eoc(eoc), .adc_data, .uart_txd(txd), .uart_rxd(rxd),
    .rx_data, .rx_avail, .rx_pop, .rx_overflow, .rx_frame_err, .seg, .an);

  adc0809_model adc (.adc_clk, .addr, .ale, .start, .oe, .eoc, .data(adc_data), .vin);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int seg_to_int(input logic [6:0] s);
    case (~s)
      7'b0111111: return 0;  7'b0000110: return 1;  7'b1011011: return 2;
      7'b1001111: return 3;  7'b1100110: return 4;  7'b1101101: return 5;
      7'b1111101: return 6;  7'b0000111: return 7;  7'b1111111: return 8;
      7'b1101111: return 9;  default:    return -1;
    endcase
  endfunction

  // PC receiver
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
      check(txd == 1, "stop bit");
      rxq.push_back(b);
    end
  end

  task automatic next_byte(output byte_t b);
    wait (rxq.size() != 0);
    b = rxq.pop_front();
  endtask

  task automatic pc_send(input byte_t b);
    @(negedge clk);
    rxd = 0; repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (CPB) @(negedge clk); end
    rxd = 1; repeat (CPB) @(negedge clk);
  endtask

  initial begin
    byte_t b;
    int expv [3];
    int d [4];
    string line, want;
    for (int i = 0; i < 8; i++) vin[i] = 8'($urandom);
    for (int ch = 0; ch < 3; ch++) expv[ch] = (2 * int'(vin[ch]) * FS[ch] + 255) / 510;
    repeat (5) @(posedge clk);
    rst <= 0;

    fork
      // the PC sends two bytes while the TIM reports
      begin
        pc_send("A");
        pc_send("B");
      end
      begin
        for (int r = 0; r < 3; r++)
          for (int j = 0; j < 24; j++) begin
            next_byte(b);
            check(b == recs[r][j], $sformatf("TEDS %0d byte %0d: %02x", r, j, b));
          end
      end
    join
    check(rx_avail && rx_data == "A", "first byte from the PC");
    @(negedge clk); rx_pop = 1; @(negedge clk); rx_pop = 0;
    check(rx_avail && rx_data == "B", "second byte from the PC");

    for (int ch = 0; ch < 3; ch++) begin
      line = "";
      for (int j = 0; j < 9; j++) begin next_byte(b); line = {line, string'(b)}; end
      want = $sformatf("T%0d=%04d\r\n", ch + 1, expv[ch]);
      check(line == want, $sformatf("line '%s' expected '%s'", line, want));
    end

    // display: sensor 1 during the first second
    for (int p = 3; p >= 0; p--) begin
      while (an != ~(4'b1 << p)) @(negedge clk);
      d[p] = seg_to_int(seg);
    end
    check(d[3] == 1 && d[2] * 100 + d[1] * 10 + d[0] == expv[0],
          $sformatf("display %0d %0d%0d%0d, expected 1 %0d", d[3], d[2], d[1], d[0], expv[0]));
    check(adc.protocol_errors == 0, "ADC protocol errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400_000_000;   // 20 M cycles
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
