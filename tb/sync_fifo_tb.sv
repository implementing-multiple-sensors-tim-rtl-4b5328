// sync_fifo_tb: self-checking test of the Tx/Rx buffer FIFO.
//
// Random pushes and pops, with phases biased toward filling and toward
// draining, are compared with a queue model: data order, full, empty,
// count and the overflow flag for a push into a full buffer.
module sync_fifo_tb;
  localparam int W = 8, D = 8;

  logic clk = 0, rst = 1, push = 0, pop = 0;
  logic [W-1:0] wdata = '0, rdata;
  logic full, empty, overflow;
  logic [3:0] count;
  logic [W-1:0] q [$];
  int checks = 0, failures = 0, n_full = 0, n_ovf = 0, n_empty_pop = 0;

  always #5 clk = ~clk;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst, .push, .wdata, .pop,
                                         .rdata, .full, .empty, .count, .overflow);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    bit exp_ovf;
    repeat (3) @(posedge clk);
    rst <= 0;
    exp_ovf = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      check(count == 4'(q.size()), $sformatf("count %0d exp %0d", count, q.size()));
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() == D), "full");
      check(overflow == exp_ovf, "overflow");
      if (q.size() != 0) check(rdata == q[0], $sformatf("rdata %02x exp %02x", rdata, q[0]));
      if (full) n_full++;
      // stimulus: phases of 200 cycles fill or drain
      push  = ($urandom % 4) < (((t / 200) % 2 != 0) ? 1 : 3);
      pop   = ($urandom % 4) < (((t / 200) % 2 != 0) ? 3 : 1);
      wdata = W'($urandom);
      exp_ovf = push && q.size() == D;
      if (exp_ovf) n_ovf++;
      if (pop && q.size() == 0) n_empty_pop++;
      begin
        int sz;
        sz = q.size();
        if (pop && sz != 0) void'(q.pop_front());
        if (push && sz != D) q.push_back(wdata);
      end
    end
    check(n_full > 0 && n_ovf > 0 && n_empty_pop > 0, "full, overflow and empty pop all exercised");
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
