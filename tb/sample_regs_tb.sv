// sample_regs_tb: self-checking test of the per-sensor sample registers.
//
// Random samples (including channels beyond NUM_CH, which must be ignored)
// and random clear pulses are applied; a reference model of the registers
// and fresh flags is kept in the testbench and compared every clock.
module sample_regs_tb;
  import tim_pkg::*;

  localparam int NUM_CH = 3;

  logic clk = 0, rst = 1;
  logic sample_valid = 0, clear_fresh = 0;
  sample_t sample = '0;
  logic [7:0] code [NUM_CH];
  logic [NUM_CH-1:0] fresh;
  logic all_fresh;
  logic [7:0] m_code [NUM_CH];
  logic [NUM_CH-1:0] m_fresh;
  int checks = 0, failures = 0, full_scans = 0;

  always #5 clk = ~clk;

  sample_regs #(.NUM_CH(NUM_CH)) dut (.clk, .rst, .sample_valid, .sample,
                                      .clear_fresh, .code, .fresh, .all_fresh);

  initial begin
    for (int i = 0; i < NUM_CH; i++) m_code[i] = '0;
    m_fresh = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      // compare with the model
      for (int i = 0; i < NUM_CH; i++) begin
        checks++;
        if (code[i] !== m_code[i]) begin
          failures++; $display("FAIL t=%0d code[%0d]=%02x exp %02x", t, i, code[i], m_code[i]);
        end
      end
      checks++;
      if (fresh !== m_fresh || all_fresh !== (m_fresh == '1)) begin
        failures++; $display("FAIL t=%0d fresh=%b exp %b", t, fresh, m_fresh);
      end
      if (all_fresh) full_scans++;
      // next stimulus
      sample_valid = ($urandom % 3) != 0;
      sample.ch    = 3'($urandom % 4);
      sample.code  = 8'($urandom);
      clear_fresh  = ($urandom % 8) == 0;
      // model update at the coming edge
      if (clear_fresh) m_fresh = '0;
      if (sample_valid && int'(sample.ch) < NUM_CH) begin
        m_code[int'(sample.ch)]  = sample.code;
        m_fresh[int'(sample.ch)] = 1'b1;
      end
    end
    checks++;
    if (full_scans == 0) begin failures++; $display("FAIL: all_fresh never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
