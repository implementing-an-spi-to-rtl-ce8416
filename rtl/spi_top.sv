// spi_top: the two SPI converter peripherals of an audio board on one APB bus.
//
// APB slot 13 (PSEL13) carries the peripheral for the LTC1865L dual-channel 16-bit ADC,
// slot 14 (PSEL14) the one for the LTC1654 dual 16-bit DAC with its 24-bit command word.
// Both are instances of spi_apb and share the processor clock, reset, PENABLE, PWRITE and
// PWDATA; each returns its own PRDATA. The pins are named after the board nets: the ADC's
// CS is its CONV input (AD_CONV_ST), the DAC's CS is its CS/LD input (DAC_LD). Software
// programs each peripheral separately (16 bits per sample for the ADC, 24 for the DAC),
// normally at the same sample rate, and moves samples from the ADC to the DAC by polling
// the ready bits.
//
// test_half_clk toggles on every processor clock: a probe signal at half the clock rate
// for looking at clock jitter next to the SPI signals on a logic analyser.
//
// Follows the design: two peripherals on PSEL13/PSEL14, the pin set and the half-clock
// test signal. The APB address decoding and the processor sit outside this module.
module spi_top
  import spi_apb_pkg::*;
#(
  parameter int unsigned CLK_RATE_HZ = 30_000_000
) (
  input  logic        pclk,
  input  logic        reset_n,
  // APB
  input  logic        psel13,      // ADC peripheral
  input  logic        psel14,      // DAC peripheral
  input  logic        penable,
  input  logic        pwrite,
  input  logic [31:0] pwdata,
  output logic [31:0] prdata13,
  output logic [31:0] prdata14,
  // LTC1865L ADC
  output logic        ad_conv_st,  // CONV
  output logic        spi_ad_sck,
  output logic        spi_ad_sdi,  // to the ADC
  input  logic        spi_ad_sdo,  // from the ADC
  // LTC1654 DAC
  output logic        dac_ld,      // CS/LD
  output logic        spi_dac_clk,
  output logic        spi_dac_mosi,
  input  logic        spi_dac_miso,
  // probe
  output logic        test_half_clk
);

  spi_apb #(.CLK_RATE_HZ(CLK_RATE_HZ)) u_adc_spi (
    .pclk    (pclk),
    .reset_n (reset_n),
    .psel    (psel13),
    .penable (penable),
    .pwrite  (pwrite),
    .pwdata  (pwdata),
    .prdata  (prdata13),
    .cs      (ad_conv_st),
    .sck     (spi_ad_sck),
    .sdi     (spi_ad_sdi),
    .sdo     (spi_ad_sdo)
  );

  spi_apb #(.CLK_RATE_HZ(CLK_RATE_HZ)) u_dac_spi (
    .pclk    (pclk),
    .reset_n (reset_n),
    .psel    (psel14),
    .penable (penable),
    .pwrite  (pwrite),
    .pwdata  (pwdata),
    .prdata  (prdata14),
    .cs      (dac_ld),
    .sck     (spi_dac_clk),
    .sdi     (spi_dac_mosi),
    .sdo     (spi_dac_miso)
  );

  always_ff @(posedge pclk) begin
    if (!reset_n) test_half_clk <= 1'b0;
    else          test_half_clk <= ~test_half_clk;
  end

endmodule
