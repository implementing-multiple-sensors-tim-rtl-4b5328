// tim_pkg: constants and types shared by the transducer interface module (TIM).
//
// The TIM reads three analog sensors through an ADC0808/0809, maps each raw
// code to engineering units with a conversion ROM, and reports the readings
// and each sensor's Transducer Electronic Data Sheet (TEDS) to a PC over a
// UART, while a four-digit seven-segment display shows the readings.
// The number of sensors (three) and of ADC channels (eight) follow the
// design; the widths, the TEDS text and the conversion full-scale values are
// this implementation's choices.
package tim_pkg;

  // ADC0808/0809: 8-bit result, 3-bit channel address (eight channels).
  localparam int ADC_W       = 8;
  localparam int ADC_ADDR_W  = 3;
  localparam int ADC_CHANNELS = 8;

  // Width of a mapped reading (engineering units, up to 1023).
  localparam int MAP_W       = 10;

  // Decimal digits produced by the decoder for a MAP_W-bit value.
  localparam int DEC_DIGITS  = 4;

  // TEDS record: fixed length ASCII text per transducer.
  localparam int TEDS_LEN    = 24;

  typedef logic [7:0] byte_t;

  // One converted sample as it leaves the ADC interface.
  typedef struct packed {
    logic [ADC_ADDR_W-1:0] ch;
    logic [ADC_W-1:0]      code;
  } sample_t;

  // TEDS text of each transducer (channel 0..2 = T1..T3).
  localparam logic [TEDS_LEN*8-1:0] TEDS_T1 = "T1 TEMPERATURE 0-500 C\015\012";
  localparam logic [TEDS_LEN*8-1:0] TEDS_T2 = "T2 PRESSURE  0-250 kPa\015\012";
  localparam logic [TEDS_LEN*8-1:0] TEDS_T3 = "T3 POSITION    0-100 %\015\012";

  // Full-scale value of each transducer in its own unit; the conversion ROM
  // holds round(code * FULL_SCALE / 255).
  localparam int FS_T1 = 500;  // degrees C (LM35-type, 10 mV/C, 5 V reference)
  localparam int FS_T2 = 250;  // kPa
  localparam int FS_T3 = 100;  // percent of potentiometer travel

  // Conversion used to fill the conversion ROM (also used by testbenches).
  function automatic logic [MAP_W-1:0] code_to_units(input int full_scale, input int code);
    int v;
    v = (code * full_scale + 127) / 255;
    return v[MAP_W-1:0];
  endfunction

  // Full scale of a channel (channels past T3 map 1:1).
  function automatic int full_scale_of(input int ch);
    case (ch)
      0:       return FS_T1;
      1:       return FS_T2;
      2:       return FS_T3;
      default: return 255;
    endcase
  endfunction

  // Byte idx (0 = first sent) of the TEDS record of channel ch.
  function automatic byte_t teds_byte(input int ch, input int idx);
    logic [TEDS_LEN*8-1:0] rec;
    case (ch)
      0:       rec = TEDS_T1;
      1:       rec = TEDS_T2;
      default: rec = TEDS_T3;
    endcase
    return rec[(TEDS_LEN-1-idx)*8 +: 8];
  endfunction

endpackage
