// uart_tx_tb: self-checking test of the serial transmitter.
//
// Random bytes are offered back to back and with gaps. A line monitor in
// the testbench finds each start edge, samples every bit at mid-bit time,
// and checks the data, the stop bit, the bit period (CPB clocks) and that
// the line idles high. It also checks the ready handshake.
module uart_tx_tb;
  localparam int CPB = 16;

  logic clk = 0, rst = 1, valid = 0, ready, txd;
  logic [7:0] data = '0;
  logic [7:0] sent [$];
  int checks = 0, failures = 0, received = 0;

  always #5 clk = ~clk;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst, .valid, .data, .ready, .txd);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // line monitor
  initial begin
    logic [7:0] b;
    int t0;
    @(negedge rst);
    forever begin
      @(negedge txd);
      repeat (CPB / 2) @(posedge clk);
      check(txd == 0, "start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = txd;
      end
      repeat (CPB) @(posedge clk);
      check(txd == 1, "stop bit");
      check(sent.size() != 0, "unexpected frame");
      if (sent.size() != 0) begin
        logic [7:0] e;
        e = sent.pop_front();
        check(b == e, $sformatf("byte %02x expected %02x", b, e));
      end
      received++;
    end
  end

  // frame length: start edge to ready returning
  int fstart = 0, cyc = 0;
  always @(posedge clk) cyc++;
  always @(negedge ready) fstart = cyc;
  always @(posedge ready) if (!rst && fstart != 0)
    check(cyc - fstart >= 10 * CPB && cyc - fstart <= 10 * CPB + 1,
          $sformatf("frame took %0d cycles", cyc - fstart));

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    check(txd == 1 && ready == 1, "idle after reset");
    for (int k = 0; k < 20; k++) begin
      @(negedge clk);
      valid = 1; data = 8'($urandom);
      if (k == 0) data = 8'h00;
      if (k == 1) data = 8'hff;
      while (!ready) @(negedge clk);
      sent.push_back(data);
      @(negedge clk);
      valid = 0;
      check(ready == 0, "busy after accept");
      if (k % 3 == 0) repeat ($urandom % (3 * CPB)) @(negedge clk);
    end
    while (!ready) @(negedge clk);
    repeat (CPB) @(negedge clk);
    check(received == 20, $sformatf("received %0d frames", received));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
