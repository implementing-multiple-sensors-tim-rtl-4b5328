// adc0809_if_tb: self-checking test of the ADC0808/0809 scan controller.
//
// The controller drives the behavioural converter model. The test changes
// the analog inputs after every sample and checks that samples arrive in
// channel order 0,1,2,0,... with the code the model converted, that scans
// start SCAN_CYC clocks apart,
// that ALE/START pulses last PULSE_CYC clocks, that the model saw no
// protocol error, and that each conversion takes between the model's 64 ADC
// clocks and that time plus the controller's fixed overheads.
module adc0809_if_tb;
  import tim_pkg::*;

  localparam int NUM_CH = 3, DIV = 4, PULSE = 4, EOCW = 40, OEC = 4, SCAN = 1500;

  logic clk = 0, rst = 1;
  logic adc_clk, ale, start, oe, eoc;
  logic [2:0] addr;
  logic [7:0] data;
  logic [7:0] vin [8];
  logic sample_valid;
  sample_t sample;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  adc0809_if #(.NUM_CH(NUM_CH), .ADC_CLK_DIV(DIV), .PULSE_CYC(PULSE),
               .EOC_WAIT_CYC(EOCW), .OE_CYC(OEC), .SCAN_CYC(SCAN)) dut (
    .clk, .rst, .adc_clk, .adc_addr(addr), .adc_ale(ale), .adc_start(start),
    .adc_oe(oe), .adc_eoc(eoc), .adc_data(data), .sample_valid, .sample);

  adc0809_model adc (.adc_clk, .addr, .ale, .start, .oe, .eoc, .data, .vin);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ALE pulse width
  int ale_len = 0;
  always @(posedge clk) begin
    if (rst) ale_len = 0;
    else if (ale) ale_len++;
    else if (ale_len != 0) begin
      check(ale_len == PULSE, $sformatf("ALE width %0d", ale_len));
      ale_len = 0;
    end
  end

  // expected codes: the value of vin at the moment the model converts
  logic [7:0] expect_code [8];
  always @(posedge eoc) if (!rst) expect_code[adc.addr_q] = vin[adc.addr_q];

  int n = 0, last_cyc = 0, cyc = 0, last_scan = 0, scans = 0;
  always @(posedge clk) cyc++;

  always @(posedge clk) begin
    if (!rst && sample_valid) begin
      check(int'(sample.ch) == n % NUM_CH, $sformatf("channel %0d expected %0d", sample.ch, n % NUM_CH));
      check(sample.code == expect_code[sample.ch],
            $sformatf("code %02x expected %02x on ch %0d", sample.code, expect_code[sample.ch], sample.ch));
      if (sample.ch == 0) begin
        // scans start SCAN clocks apart (within the ADC clock phase jitter)
        if (n > 0) begin
          check(cyc - last_scan >= SCAN - 2 * DIV - 4 && cyc - last_scan <= SCAN + 2 * DIV + 4,
                $sformatf("scan interval %0d cycles", cyc - last_scan));
          scans++;
        end
        last_scan = cyc;
      end else if (n > 0) begin
        // 64 ADC clocks, plus ALE/START, wait, EOC sync, OE and up to 2 ADC clocks of phase
        check(cyc - last_cyc >= 64 * DIV && cyc - last_cyc <= 64 * DIV + PULSE + OEC + 2 * DIV + 8,
              $sformatf("conversion took %0d cycles", cyc - last_cyc));
      end
      last_cyc = cyc;
      n++;
      for (int i = 0; i < 8; i++) vin[i] = 8'($urandom);
    end
  end

  initial begin
    for (int i = 0; i < 8; i++) begin vin[i] = 8'($urandom); expect_code[i] = '0; end
    repeat (4) @(posedge clk);
    rst = 0;
    wait (n == 12);
    @(posedge clk);
    check(adc.protocol_errors == 0, $sformatf("%0d ADC protocol errors", adc.protocol_errors));
    check(adc.conversions >= 12, "conversion count");
    check(scans >= 3, "scan intervals checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
