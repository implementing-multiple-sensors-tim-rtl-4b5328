// tim_controller_tb: self-checking test of the main controller, run with the
// conversion ROM and the TEDS ROM attached.
//
// The testbench plays the sample registers (new random codes and all_fresh
// after each clear) and the UART transmit buffer (tx_full held high at
// random to force back-pressure). Every pushed byte is compared with the
// expected stream, worked out here: the three 24-byte TEDS records, then for
// each scan one line "Tn=dddd\r\n" per sensor with dddd = round(code*FS/255)
// for full scales 500, 250 and 100. It also checks the display readings, the
// status outputs and that no byte is pushed while the buffer is full.
module tim_controller_tb;
  import tim_pkg::*;

  localparam int NUM_CH = 3, SCANS = 5;
  localparam real FS [3] = '{500.0, 250.0, 100.0};
  string recs [3] = '{"T1 TEMPERATURE 0-500 C\r\n",
                      "T2 PRESSURE  0-250 kPa\r\n",
                      "T3 POSITION    0-100 %\r\n"};

  logic clk = 0, rst = 1;
  logic [7:0] code [NUM_CH];
  logic all_fresh = 0, clear_fresh;
  logic map_en, teds_en, tx_push, tx_full = 0, reading_valid, teds_done;
  logic [2:0] map_ch;
  logic [7:0] map_code;
  logic [MAP_W-1:0] mapped;
  logic [6:0] teds_addr;
  byte_t teds_data, tx_data;
  logic [MAP_W-1:0] reading [NUM_CH];
  byte_t expq [$];
  int exp_val [NUM_CH];
  int checks = 0, failures = 0, pushed = 0, stalls = 0, scans = 0;

  always #5 clk = ~clk;

  tim_controller #(.NUM_CH(NUM_CH)) dut (
    .clk, .rst, .code, .all_fresh, .clear_fresh, .map_en, .map_ch, .map_code, .mapped,
    .teds_en, .teds_addr, .teds_data, .tx_push, .tx_data, .tx_full,
    .reading, .reading_valid, .teds_done);
  map_rom  #(.NUM_CH(NUM_CH)) u_map  (.clk, .en(map_en), .addr_ch(map_ch), .addr_code(map_code), .mapped);
  teds_rom #(.NUM_CH(NUM_CH)) u_teds (.clk, .en(teds_en), .addr(teds_addr), .data(teds_data));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // transmit-buffer side: random back-pressure, compare pushed bytes
  always @(posedge clk) if (!rst) begin
    if (tx_push) begin
      check(!tx_full, "push while full");
      check(expq.size() != 0, "unexpected byte");
      if (expq.size() != 0) begin
        byte_t e;
        e = expq.pop_front();
        check(tx_data == e, $sformatf("byte %0d: %02x expected %02x", pushed, tx_data, e));
      end
      pushed++;
    end
    if (tx_full) stalls++;
    tx_full <= ($urandom % 3) == 0;
  end

  // sample-register side
  always @(posedge clk) if (!rst) begin
    if (clear_fresh) begin
      check(all_fresh, "clear without complete scan");
      for (int i = 0; i < NUM_CH; i++) begin
        string s;
        exp_val[i] = int'($floor(real'(code[i]) * FS[i] / 255.0 + 0.5));
        s = $sformatf("T%0d=%04d\r\n", i + 1, exp_val[i]);
        for (int j = 0; j < s.len(); j++) expq.push_back(s[j]);
      end
      all_fresh <= 0;
      scans++;
    end
  end

  initial begin
    for (int i = 0; i < NUM_CH; i++) code[i] = 8'($urandom);
    for (int r = 0; r < NUM_CH; r++)
      for (int j = 0; j < 24; j++) expq.push_back(recs[r][j]);
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    check(!teds_done && !reading_valid, "status after reset");
    wait (teds_done);
    check(pushed == 72, $sformatf("TEDS bytes before teds_done: %0d", pushed));
    for (int s = 0; s < SCANS; s++) begin
      repeat ($urandom % 50) @(posedge clk);
      @(negedge clk);
      for (int i = 0; i < NUM_CH; i++) code[i] = (s == 0) ? 8'hff : 8'($urandom);
      all_fresh = 1;
      wait (scans == s + 1);
      wait (expq.size() == 0);
      repeat (3) @(posedge clk);
      check(reading_valid, "reading_valid");
      for (int i = 0; i < NUM_CH; i++)
        check(int'(reading[i]) == exp_val[i], $sformatf("reading[%0d]=%0d expected %0d", i, reading[i], exp_val[i]));
    end
    check(pushed == 72 + SCANS * NUM_CH * 9, $sformatf("pushed %0d bytes", pushed));
    check(stalls > 0, "back-pressure exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
