// teds_rom_tb: self-checking test of the TEDS store.
//
// Reads every byte of the three 24-byte records and compares it with the
// expected text, written out here, and checks the one-clock read latency.
module teds_rom_tb;
  import tim_pkg::*;

  localparam int NUM_CH = 3;
  string recs [3] = '{"T1 TEMPERATURE 0-500 C\r\n",
                      "T2 PRESSURE  0-250 kPa\r\n",
                      "T3 POSITION    0-100 %\r\n"};

  logic clk = 0, en = 0;
  logic [6:0] addr = '0;
  byte_t data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  teds_rom #(.NUM_CH(NUM_CH)) dut (.clk, .en, .addr, .data);

  initial begin
    for (int r = 0; r < NUM_CH; r++) begin
      checks++;
      if (recs[r].len() != 24) begin failures++; $display("FAIL: bad reference length"); end
      for (int i = 0; i < 24; i++) begin
        @(negedge clk);
        en = 1; addr = 7'(r * 24 + i);
        @(negedge clk);
        en = 0;
        checks++;
        if (data !== recs[r][i]) begin
          failures++;
          $display("FAIL record %0d byte %0d: %02x expected %02x", r, i, data, recs[r][i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
