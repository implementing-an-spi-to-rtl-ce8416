// spi_apb_pkg: types and constants shared by the APB-to-SPI converter peripheral
// (spi_apb), its top level (spi_top) and their testbenches.
//
// It fixes three encodings:
//  * the state machine's states. The state names and the order in which they are
//    visited follow the design; the 5-bit numeric codes (Init = 0 ... Talk5 = 10) are
//    this design's own choice. They are visible to software in PRDATA[29:25].
//  * the PWDATA command word: bit 31 enable, bit 30 disable, bits 21..5 sample rate in
//    samples/s, bits 4..0 bits per sample; and for a data/command word to the converter
//    bits 23..20 control, 19..16 address, 15..0 data.
//  * the PRDATA status word: bit 31 ready, bit 30 enabled, bits 29..25 current state,
//    bit 24 zero, bits 23..0 the word shifted in from the converter (SDO_Data).
package spi_apb_pkg;

  typedef enum logic [4:0] {
    ST_INIT          = 5'd0,
    ST_INIT_PARSE    = 5'd1,
    ST_CONVERT_READY = 5'd2,
    ST_CONVERT       = 5'd3,
    ST_CONVERT_WAIT  = 5'd4,
    ST_TALK0         = 5'd5,
    ST_TALK1         = 5'd6,
    ST_TALK2         = 5'd7,
    ST_TALK3         = 5'd8,
    ST_TALK4         = 5'd9,
    ST_TALK5         = 5'd10
  } spi_state_e;

  // Widths of the command fields.
  localparam int unsigned RATE_W = 17;  // PWDATA[21:5], up to 131071 samples/s
  localparam int unsigned BITS_W = 5;   // PWDATA[4:0]
  localparam int unsigned WORD_W = 24;  // longest converter word (the DAC's 24 bits)

  // SCK half period in processor clocks (Talk0..Talk2 low, Talk3..Talk5 high).
  localparam int unsigned CLKS_PER_SCK = 6;

  // Enable/configuration command, as written to PWDATA while the peripheral is in Init.
  typedef struct packed {
    logic              enable;     // [31]
    logic              disable_;   // [30]
    logic [7:0]        unused;     // [29:22]
    logic [RATE_W-1:0] rate;       // [21:5]  samples per second
    logic [BITS_W-1:0] bits;       // [4:0]   bits per sample (16 for the ADC, 24 for the DAC)
  } cfg_word_t;

  // Word for the converter, as written to PWDATA while the peripheral is running.
  typedef struct packed {
    logic [7:0]  unused;    // [31:24] (bit 30 must be 0: it is the disable bit)
    logic [3:0]  control;   // [23:20]
    logic [3:0]  address;   // [19:16]
    logic [15:0] data;      // [15:0]
  } data_word_t;

  // Status word returned on PRDATA.
  typedef struct packed {
    logic              ready;      // [31]
    logic              enabled;    // [30]
    spi_state_e        state;      // [29:25]
    logic              zero;       // [24]
    logic [WORD_W-1:0] sdo_data;   // [23:0]
  } status_word_t;

endpackage
