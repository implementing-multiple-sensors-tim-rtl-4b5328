// adc0809_model: behavioural model of an ADC0808/0809 eight-channel 8-bit
// converter, for simulation only (not synthesizable logic).
//
// The rising edge of ALE latches the channel address. The falling edge of
// START begins a conversion: EOC falls 8 ADC clocks later and rises again
// 64 ADC clocks after START fell, when the result of the selected input is
// ready. While OE is high the result drives DATA, otherwise DATA reads 0
// (the real part floats its outputs). vin[] holds the analog input of each
// channel, already expressed as the code the converter will produce.
// The model counts conversions and protocol errors: OE raised while EOC is
// low, or a START pulse while a conversion is still running.
module adc0809_model (
  input  logic       adc_clk,
  input  logic [2:0] addr,
  input  logic       ale,
  input  logic       start,
  input  logic       oe,
  output logic       eoc,
  output logic [7:0] data,
  input  logic [7:0] vin [8]
);

  logic [2:0] addr_q = '0;
  logic [7:0] result = '0;
  logic       busy   = 1'b0;
  int         conversions = 0;
  int         protocol_errors = 0;

  initial eoc = 1'b1;

  always @(posedge ale) addr_q = addr;

  always @(negedge start) begin
    if (busy) protocol_errors++;
    busy = 1'b1;
    repeat (8) @(posedge adc_clk);
    eoc = 1'b0;
    repeat (56) @(posedge adc_clk);
    result = vin[addr_q];
    eoc = 1'b1;
    busy = 1'b0;
    conversions++;
  end

  always @(posedge oe) if (!eoc) protocol_errors++;

  assign data = oe ? result : 8'h00;

endmodule
