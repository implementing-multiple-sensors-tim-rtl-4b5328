// map_rom: conversion ROM from raw ADC code to engineering units.
//
// For sensor ch and raw code c the ROM holds round(c * FS(ch) / 255), the
// reading in the sensor's own unit: degrees C for T1 (0..500), kPa for T2
// (0..250) and percent for T3 (0..100); FS values are in tim_pkg. The table
// is computed at elaboration, one 256-entry page per sensor, and is read
// synchronously: the value for addr_ch/addr_code appears on mapped one clock
// after en.
// A ROM that turns raw codes into user-defined conversions follows the
// design; the sensor ranges and the linear rule are this implementation's
// choice.
module map_rom
  import tim_pkg::*;
#(
  parameter int NUM_CH = 3
) (
  input  logic                  clk,
  input  logic                  en,
  input  logic [ADC_ADDR_W-1:0] addr_ch,
  input  logic [ADC_W-1:0]      addr_code,
  output logic [MAP_W-1:0]      mapped
);

  localparam int DEPTH = NUM_CH << ADC_W;

  logic [MAP_W-1:0] rom [DEPTH];

  initial begin
    for (int a = 0; a < DEPTH; a++)
      rom[a] = code_to_units(full_scale_of(a >> ADC_W), a % (1 << ADC_W));
  end

  always_ff @(posedge clk) begin
    if (en) mapped <= rom[(int'(addr_ch) * 256 + int'(addr_code)) % DEPTH];
  end

endmodule
