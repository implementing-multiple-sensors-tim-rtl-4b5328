// map_rom_tb: self-checking test of the conversion ROM.
//
// Every address of every sensor page is read; the expected value is the
// rounded linear conversion code * full_scale / 255 worked out here in real
// arithmetic (full scales 500, 250 and 100). The read latency of one clock
// and holding the output while en is low are also checked.
module map_rom_tb;
  import tim_pkg::*;

  localparam int NUM_CH = 3;
  localparam real FS [3] = '{500.0, 250.0, 100.0};

  logic clk = 0, en = 0;
  logic [2:0] ch = '0;
  logic [7:0] c = '0;
  logic [MAP_W-1:0] mapped;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  map_rom #(.NUM_CH(NUM_CH)) dut (.clk, .en, .addr_ch(ch), .addr_code(c), .mapped);

  initial begin
    int expv;
    logic [MAP_W-1:0] held;
    for (int k = 0; k < NUM_CH; k++) begin
      for (int v = 0; v < 256; v++) begin
        @(negedge clk);
        en = 1; ch = 3'(k); c = 8'(v);
        @(negedge clk);
        en = 0;
        expv = int'($floor(real'(v) * FS[k] / 255.0 + 0.5));
        checks++;
        if (int'(mapped) != expv) begin
          failures++;
          $display("FAIL ch %0d code %0d: %0d expected %0d", k, v, mapped, expv);
        end
      end
    end
    // output holds while en is low
    held = mapped;
    c = 8'h11; ch = 3'd0;
    repeat (3) @(negedge clk);
    checks++;
    if (mapped !== held) begin failures++; $display("FAIL: output changed with en low"); end
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
