// ltc1865l_model: behavioural model of an LTC1865L-style dual-channel 16-bit ADC, for
// simulation only (not synthesizable logic).
//
// A rising CONV edge samples the analog input of the channel chosen by the previous
// transfer and starts a conversion that takes TCONV. While CONV is low the result is
// shifted out MSB first on SDO: the first bit appears when CONV falls, each following bit
// TDO after a falling SCK edge. The first two SDI bits clocked in on rising SCK edges
// choose the channel of the next conversion: {SGL/DIFF, ODD/SIGN}; with SGL/DIFF = 1 the
// ODD bit selects channel 1 (1) or channel 0 (0). Further SDI bits are ignored.
// The analog inputs are given as the 16-bit codes ain0 and ain1.
// Counters: conversions, short_conv (CONV brought low before TCONV ended),
// timing_errors (SDI setup before rising SCK under TSU, CONV low to first rising SCK under
// TCSS), bad_length (a transfer of other than 16 SCK cycles).
module ltc1865l_model #(
  parameter realtime TCONV = 4660ns,
  parameter realtime TDO   = 60ns,
  parameter realtime TSU   = 52ns,
  parameter realtime TCSS  = 85ns
) (
  input  logic        conv,
  input  logic        sck,
  input  logic        sdi,
  output logic        sdo,
  input  logic [15:0] ain0,
  input  logic [15:0] ain1
);
  logic [15:0] result = '0;
  logic [15:0] outreg = '0;
  logic [1:0]  cfg_in = '0;
  logic        next_ch = 1'b0;      // channel of the next conversion
  logic        last_ch = 1'b0;      // channel of the conversion in `result`
  int          nbits = 0;
  int          conversions = 0;
  int          short_conv = 0;
  int          timing_errors = 0;
  int          bad_length = 0;
  realtime     t_conv_rise = 0;
  realtime     t_conv_fall = 0;
  realtime     t_sdi = 0;
  bit          started = 1'b0;

  initial sdo = 1'b0;

  always @(sdi) t_sdi = $realtime;

  always @(posedge conv) begin
    if (started && nbits != 16) bad_length++;
    t_conv_rise = $realtime;
    result      = next_ch ? ain1 : ain0;
    last_ch     = next_ch;
    conversions++;
  end

  always @(negedge conv) begin
    if (conversions > 0 && ($realtime - t_conv_rise < TCONV)) short_conv++;
    started     = 1'b1;
    t_conv_fall = $realtime;
    nbits       = 0;
    outreg      = result;
    sdo         = outreg[15];
  end

  always @(posedge sck) begin
    if (!conv) begin
      if ($realtime - t_sdi < TSU) timing_errors++;
      if (nbits == 0 && ($realtime - t_conv_fall < TCSS)) timing_errors++;
      if (nbits < 2) cfg_in = {cfg_in[0], sdi};
      nbits++;
      if (nbits == 2) next_ch = cfg_in[1] ? cfg_in[0] : 1'b0;
    end
  end

  always @(negedge sck) begin
    if (!conv) begin
      outreg = {outreg[14:0], 1'b0};
      sdo <= #(TDO) outreg[15];
    end
  end
endmodule
