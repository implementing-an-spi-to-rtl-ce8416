// ltc1654_model: behavioural model of an LTC1654-style dual 16-bit DAC with a 24-bit
// serial word, for simulation only (not synthesizable logic).
//
// While CS/LD is low, SDI is shifted in MSB first on every rising SCK edge. The rising
// edge of CS/LD executes the word {control[3:0], address[3:0], data[15:0]}. DOUT
// (the daisy-chain output) shows the MSB of the shift register, so during one transfer it
// returns the previous word; it changes TDO after a falling SCK edge.
//
// Commands understood by this model (the model's own table):
//   control 4'b0011  load and update: address 0 -> DAC A, 1 -> DAC B, 15 -> both
//   control 4'b1100  fast mode on for the addressed DAC(s)
//   control 4'b1101  slow mode for the addressed DAC(s)
//   control 4'b1111  no operation
// The model also checks the SPI timing it sees: SDI set up at least TSU before the rising
// SCK edge, and at least TCSS from CS/LD falling to the first rising SCK edge.
// Counters: words (executed words), bad_length (words not 24 bits long), timing_errors.
module ltc1654_model #(
  parameter realtime TDO  = 60ns,
  parameter realtime TSU  = 52ns,
  parameter realtime TCSS = 85ns
) (
  input  logic cs_ld,
  input  logic sck,
  input  logic sdi,
  output logic dout
);
  logic [23:0] shreg = '0;
  int          nbits = 0;
  logic [23:0] last_word = '0;
  logic [15:0] dac_value [2] = '{16'h0, 16'h0};
  logic        fast [2] = '{1'b0, 1'b0};
  int          words = 0;
  int          bad_length = 0;
  int          timing_errors = 0;
  realtime     t_sdi = 0;
  realtime     t_cs_fall = 0;

  initial dout = 1'b0;

  always @(sdi) t_sdi = $realtime;

  always @(negedge cs_ld) begin
    t_cs_fall = $realtime;
    nbits     = 0;
    dout      = shreg[23];
  end

  always @(posedge sck) begin
    if (!cs_ld) begin
      if ($realtime - t_sdi < TSU) timing_errors++;
      if (nbits == 0 && ($realtime - t_cs_fall < TCSS)) timing_errors++;
      shreg = {shreg[22:0], sdi};
      nbits++;
    end
  end

  always @(negedge sck) begin
    if (!cs_ld) dout <= #(TDO) shreg[23];
  end

  always @(posedge cs_ld) begin
    if (nbits != 24) begin
      if (nbits != 0) bad_length++;   // CS/LD pulses without SCK edges load nothing
    end else begin
      last_word = shreg;
      words++;
      case (shreg[23:20])
        4'b0011: begin
          if (shreg[19:16] == 4'd0 || shreg[19:16] == 4'hf) dac_value[0] = shreg[15:0];
          if (shreg[19:16] == 4'd1 || shreg[19:16] == 4'hf) dac_value[1] = shreg[15:0];
        end
        4'b1100, 4'b1101: begin
          if (shreg[19:16] == 4'd0 || shreg[19:16] == 4'hf) fast[0] = (shreg[23:20] == 4'b1100);
          if (shreg[19:16] == 4'd1 || shreg[19:16] == 4'hf) fast[1] = (shreg[23:20] == 4'b1100);
        end
        default: ;
      endcase
    end
  end
endmodule
