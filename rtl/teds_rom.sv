// teds_rom: Transducer Electronic Data Sheet (TEDS) store.
//
// Holds one TEDS_LEN-byte ASCII record per transducer, read one byte per
// request so that the controller can pass it to the UART. Record ch starts
// at byte address ch*TEDS_LEN. Read is synchronous: the byte for addr
// appears on data one clock after en.
// Keeping the TEDS in a ROM and sending it to the PC follows the design; the
// record contents (name, measured quantity, range, unit as readable text)
// are this implementation's choice and are defined in tim_pkg.
module teds_rom
  import tim_pkg::*;
#(
  parameter int NUM_CH = 3,
  localparam int DEPTH = NUM_CH * TEDS_LEN,
  localparam int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          en,
  input  logic [AW-1:0] addr,
  output byte_t         data
);

  byte_t rom [DEPTH];

  initial begin
    for (int a = 0; a < DEPTH; a++)
      rom[a] = teds_byte(a / TEDS_LEN, a % TEDS_LEN);
  end

  always_ff @(posedge clk) begin
    if (en) data <= rom[addr];
  end

endmodule
