// value_decoder: binary to decimal digits and ASCII characters.
//
// The decoder turns a MAP_W-bit reading into DEC_DIGITS binary-coded decimal
// digits with the shift-and-add-3 (double dabble) method, and gives each
// digit's ASCII character ('0' + digit) for the terminal. digit[0] is the
// units digit. Purely combinational.
// Decoding the readings to ASCII for the PC follows the design; the method
// is this implementation's choice.
module value_decoder
  import tim_pkg::*;
(
  input  logic [MAP_W-1:0] value,
  output logic [3:0]       digit [DEC_DIGITS],
  output byte_t            ascii [DEC_DIGITS]
);

  logic [DEC_DIGITS*4-1:0] bcd;

  always_comb begin
    bcd = '0;
    for (int i = MAP_W - 1; i >= 0; i--) begin
      for (int d = 0; d < DEC_DIGITS; d++)
        if (bcd[d*4 +: 4] >= 4'd5) bcd[d*4 +: 4] = bcd[d*4 +: 4] + 4'd3;
      bcd = {bcd[DEC_DIGITS*4-2:0], value[i]};
    end
  end

  always_comb begin
    for (int d = 0; d < DEC_DIGITS; d++) begin
      digit[d] = bcd[d*4 +: 4];
      ascii[d] = 8'h30 + {4'h0, bcd[d*4 +: 4]};
    end
  end

endmodule
