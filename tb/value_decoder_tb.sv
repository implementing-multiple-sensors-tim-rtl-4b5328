// value_decoder_tb: self-checking test of the binary to decimal/ASCII
// decoder over every 10-bit input value.
module value_decoder_tb;
  import tim_pkg::*;

  logic [MAP_W-1:0] value;
  logic [3:0] digit [DEC_DIGITS];
  byte_t ascii [DEC_DIGITS];
  int checks = 0, failures = 0;

  value_decoder dut (.value, .digit, .ascii);

  initial begin
    int p;
    for (int v = 0; v < (1 << MAP_W); v++) begin
      value = MAP_W'(v);
      #1;
      p = v;
      for (int d = 0; d < DEC_DIGITS; d++) begin
        checks++;
        if (int'(digit[d]) != p % 10 || ascii[d] != byte_t'(48 + p % 10)) begin
          failures++;
          $display("FAIL value %0d digit %0d: %0d/%02x", v, d, digit[d], ascii[d]);
        end
        p = p / 10;
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
