// seg7_display_tb: self-checking test of the multiplexed display driver.
//
// With short digit and rotation periods the testbench decodes the segment
// and anode lines every clock: exactly one anode is active, the digits come
// round every DIGIT_CYC clocks, before the first reading every digit is a
// dash, and afterwards the leftmost digit is the shown sensor's number
// and the other three the hundreds, tens and units of its reading. The
// shown sensor must step 1, 2, 3, 1, ... every SHOW_CYC clocks.
module seg7_display_tb;
  import tim_pkg::*;

  localparam int NUM_CH = 3, DC = 4, SC = 100;

  logic clk = 0, rst = 1, reading_valid = 0;
  logic [MAP_W-1:0] reading [NUM_CH];
  logic [6:0] seg;
  logic [3:0] an;
  logic [2:0] shown_ch;
  int checks = 0, failures = 0, cyc = 0, changes = 0, last_change = 0;
  bit seen [NUM_CH];

  always #5 clk = ~clk;

  seg7_display #(.NUM_CH(NUM_CH), .DIGIT_CYC(DC), .SHOW_CYC(SC)) dut (
    .clk, .rst, .reading, .reading_valid, .seg, .an, .shown_ch);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // active-low segment pattern {g,f,e,d,c,b,a} to a character
  function automatic int seg_to_int(input logic [6:0] s);
    case (~s)
      7'b0111111: return 0;
      7'b0000110: return 1;
      7'b1011011: return 2;
      7'b1001111: return 3;
      7'b1100110: return 4;
      7'b1101101: return 5;
      7'b1111101: return 6;
      7'b0000111: return 7;
      7'b1111111: return 8;
      7'b1101111: return 9;
      7'b1000000: return -1;   // dash
      default:    return -2;
    endcase
  endfunction

  logic [3:0] last_an = 4'hf;
  int an_hold = 0;
  logic [2:0] last_ch = 0;

  always @(negedge clk) if (!rst) begin
    int pos, got, expv, v;
    cyc++;
    pos = -1;
    for (int i = 0; i < 4; i++) if (an == ~(4'b1 << i)) pos = i;
    check(pos >= 0, $sformatf("anodes %b", an));
    got = seg_to_int(seg);
    if (!reading_valid) expv = -1;
    else begin
      v = int'(reading[int'(shown_ch)]);
      case (pos)
        3: expv = int'(shown_ch) + 1;
        2: expv = (v / 100) % 10;
        1: expv = (v / 10) % 10;
        default: expv = v % 10;
      endcase
    end
    check(got == expv, $sformatf("digit %0d shows %0d expected %0d (sensor %0d)", pos, got, expv, shown_ch));
    if (an == last_an) an_hold++;
    else begin
      if (last_an != 4'hf) check(an_hold == DC, $sformatf("digit held %0d clocks", an_hold));
      an_hold = 1;
    end
    last_an = an;
    if (shown_ch != last_ch) begin
      check(int'(shown_ch) == (int'(last_ch) + 1) % NUM_CH, "rotation order");
      if (changes > 0) check(cyc - last_change == SC, $sformatf("sensor shown %0d clocks", cyc - last_change));
      changes++;
      last_change = cyc;
    end
    last_ch = shown_ch;
    if (reading_valid) seen[int'(shown_ch)] = 1;
  end

  initial begin
    reading = '{123, 456, 7};
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (150) @(posedge clk);
    @(negedge clk);
    reading_valid = 1;
    repeat (400) @(posedge clk);
    @(negedge clk);
    reading = '{999, 80, 1023};
    repeat (400) @(posedge clk);
    check(changes >= 8, $sformatf("%0d sensor changes", changes));
    check(seen[0] && seen[1] && seen[2], "all sensors shown");
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
