// uart_rx_tb: self-checking test of the serial receiver.
//
// The testbench drives 8N1 frames at a bit period of CPB clocks, with small
// random timing skew, and checks each received byte, that valid comes
// about 9.5 bit times after the start edge, that a frame with a low stop bit
// raises frame_err instead of valid, and that a short low glitch on the idle
// line produces nothing.
module uart_rx_tb;
  localparam int CPB = 32;

  logic clk = 0, rst = 1, rxd = 1;
  logic valid, frame_err;
  logic [7:0] data;
  logic [7:0] expq [$];
  int checks = 0, failures = 0, n_valid = 0, n_err = 0, cyc = 0, t_start = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst, .rxd, .valid, .data, .frame_err);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input logic [7:0] b, input bit stop);
    int per;
    @(negedge clk);
    t_start = cyc;
    per = CPB + int'($urandom % 3) - 1;   // +-1 clock per bit
    rxd = 0; repeat (per) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (per) @(negedge clk); end
    rxd = stop; repeat (per) @(negedge clk);
    rxd = 1; repeat (CPB) @(negedge clk);
  endtask

  always @(posedge clk) if (!rst) begin
    if (valid) begin
      n_valid++;
      check(expq.size() != 0, "unexpected byte");
      if (expq.size() != 0) begin
        logic [7:0] e;
        e = expq.pop_front();
        check(data == e, $sformatf("got %02x expected %02x", data, e));
      end
      check(cyc - t_start >= 9 * CPB - 12 && cyc - t_start <= 10 * CPB + 12,
            $sformatf("valid %0d cycles after start", cyc - t_start));
    end
    if (frame_err) n_err++;
  end

  initial begin
    logic [7:0] b;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);
    for (int k = 0; k < 24; k++) begin
      b = 8'($urandom);
      expq.push_back(b);
      send(b, 1'b1);
    end
    check(n_valid == 24, $sformatf("%0d bytes received", n_valid));
    // framing error
    send(8'h5a, 1'b0);
    check(n_err == 1 && n_valid == 24, $sformatf("frame error reported (%0d errors, %0d bytes)", n_err, n_valid));
    // glitch shorter than half a bit
    @(negedge clk); rxd = 0; repeat (CPB / 4) @(negedge clk); rxd = 1;
    repeat (12 * CPB) @(negedge clk);
    check(n_valid == 24 && n_err == 1, "glitch ignored");
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
