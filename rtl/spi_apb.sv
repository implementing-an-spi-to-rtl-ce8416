// spi_apb: APB slave that drives an SPI converter (ADC or DAC) at a fixed sample rate.
//
// The CPU programs the peripheral with one enable word holding the sample rate (in
// samples/s) and the converter's word length (16 bits for the LTC1865L ADC, 24 for the
// LTC1654 DAC). After that, the peripheral paces itself: every sample period of
// CLK_RATE_HZ / rate processor clocks it runs one convert phase (CS high) and one load
// phase (CS low) in which it shifts the latest word from the CPU out on SDI and shifts
// the converter's answer in from SDO. The CPU polls PRDATA[31] (ready) and writes the next
// word once it is set; a word that arrives too late is not waited for, the period runs
// on and the previous word is sent again, so the sample rate never drifts.
//
// Rate pacing without a divider: on enable the counter is loaded with
//     clk_rate - rate - 6 * bits * rate
// and decremented by `rate` on every clock of the convert phase, which ends on the clock
// where the counter is below `rate`. The convert phase therefore takes
// clk_rate/rate - 6*bits clocks and the load phase 6*bits clocks, together exactly
// clk_rate/rate clocks (600 at 30 MHz and 50 ksamples/s).
//
// States (codes in spi_apb_pkg, readable in PRDATA[29:25]):
//   Init          wait for an APB write; it goes to InitParse.
//   InitParse     disable -> Init; enable -> store rate and bits, load the convert counter,
//                 clear ready, go to ConvertReady.
//   ConvertReady  count down; a write from the CPU -> Convert.
//   Convert       copy the stored word into the shift source (SDLData), count down -> ConvertWait.
//   ConvertWait   count down.
//   In each of the three: when the counter is finished, load the bit counter with bits-1,
//   drive CS and SCK low and go to Talk0.
//   Talk0  put the bit selected by the bit counter on SDI.   Talk1  nothing.
//   Talk2  SCK high.                                           Talk3  nothing.
//   Talk4  sample SDO into SDO_Data[bit counter].
//   Talk5  SCK low; last bit -> reload the convert counter, set ready, CS high, ConvertReady;
//          otherwise decrement the bit counter, Talk0.
// SCK is thus 3 clocks low and 3 clocks high; the first rising SCK edge comes 3 clocks
// after CS falls, SDI changes 1 clock after CS falls or after a falling SCK edge, and SDO
// is sampled 2 clocks after a rising SCK edge. Bits go out MSB first from PWDATA[23:0]
// (the control nibble first): a 16-bit load sends PWDATA[23:8]; the bits read back land
// in PRDATA[bits-1:0].
//
// Writing a word with bit 30 set disables the peripheral: the stored write word is the
// second source of the synchronous reset, so the next clock returns everything to Init.
// All outputs are registers. PRDATA is combinational from registers and always valid.
//
// Follows the design: the states and their actions, the SCK/CS/SDI/SDO clock timing, the
// counter formula, the PWDATA/PRDATA bit fields and disable-as-reset. This design's own
// choices: the state codes; the write word is stored only on an APB write to this
// peripheral (not on every Init clock); ready is 1 after reset so that a CPU which waits
// for ready before each command can send its first enable; the counter is finished when
// it is below `rate`; a write arriving on the clock the counter finishes is not taken;
// bits per sample is clamped to 1..24 and the rate to at least 1; a negative convert count
// is clamped to 0; the shift source and the read-back word reset to zero.
module spi_apb
  import spi_apb_pkg::*;
#(
  parameter int unsigned CLK_RATE_HZ = 30_000_000   // processor clock, Hz
) (
  input  logic        pclk,
  input  logic        reset_n,     // active-low reset from the processor
  // APB slave
  input  logic        psel,
  input  logic        penable,
  input  logic        pwrite,
  input  logic [31:0] pwdata,
  output logic [31:0] prdata,
  // SPI master
  output logic        cs,          // low during the load phase (LTC1654 CS/LD, LTC1865L CONV)
  output logic        sck,
  output logic        sdi,         // to the converter
  input  logic        sdo          // from the converter
);

  localparam int unsigned CNT_W  = $clog2(CLK_RATE_HZ + 1);
  localparam int unsigned PROD_W = CNT_W + 1;

  spi_state_e          state;
  logic [31:0]         stored_pwdata;     // last word written by the CPU
  logic [WORD_W-1:0]   sdl_data;          // word being shifted out
  logic [WORD_W-1:0]   sdo_data;          // word shifted in
  logic [RATE_W-1:0]   rate_q;            // samples per second, >= 1
  logic [BITS_W-1:0]   bits_q;            // bits per sample, 1..24
  logic [CNT_W-1:0]    counter;           // convert countdown, or bit index in Talk
  logic [CNT_W-1:0]    conv_reload;       // convert countdown start value
  logic                ready;
  logic                enabled;

  logic                apb_write;
  logic                soft_reset;
  cfg_word_t           cfg;
  logic [RATE_W-1:0]   cfg_rate;
  logic [BITS_W-1:0]   cfg_bits;
  logic [PROD_W+8-1:0] load_clocks;       // 6 * bits * rate
  logic [PROD_W+8-1:0] conv_calc;         // clk_rate - rate - 6 * bits * rate (wide, signed view)
  logic                conv_finished;

  assign apb_write  = psel && penable && pwrite;
  assign soft_reset = cfg.disable_;

  // Fields of the enable word, clamped to what the shifter supports.
  assign cfg      = cfg_word_t'(stored_pwdata);
  assign cfg_rate = (cfg.rate == '0) ? RATE_W'(1) : cfg.rate;
  assign cfg_bits = (cfg.bits == '0)          ? BITS_W'(1) :
                    (cfg.bits > BITS_W'(WORD_W)) ? BITS_W'(WORD_W) : cfg.bits;

  always_comb begin
    load_clocks = (PROD_W + 8)'(CLKS_PER_SCK) * (PROD_W + 8)'(cfg_bits) * (PROD_W + 8)'(cfg_rate);
    conv_calc   = (PROD_W + 8)'(CLK_RATE_HZ) - (PROD_W + 8)'(cfg_rate) - load_clocks;
  end

  assign conv_finished = (counter < CNT_W'(rate_q));

  always_ff @(posedge pclk) begin
    if (!reset_n || soft_reset) begin
      state         <= ST_INIT;
      stored_pwdata <= '0;
      sdl_data      <= '0;
      sdo_data      <= '0;
      rate_q        <= RATE_W'(1);
      bits_q        <= BITS_W'(1);
      counter       <= '0;
      conv_reload   <= '0;
      ready         <= 1'b1;
      enabled       <= 1'b0;
      cs            <= 1'b1;
      sck           <= 1'b0;
      sdi           <= 1'b0;
    end else begin
      if (apb_write) stored_pwdata <= pwdata;

      unique case (state)
        ST_INIT: begin
          if (apb_write) state <= ST_INIT_PARSE;
        end

        ST_INIT_PARSE: begin
          // A disable word never gets here (it resets the block); anything without the
          // enable bit is ignored.
          if (cfg.enable) begin
            rate_q      <= cfg_rate;
            bits_q      <= cfg_bits;
            // conv_calc is negative when its top bit is set: clamp to zero.
            if (conv_calc[PROD_W+8-1]) begin
              counter     <= '0;
              conv_reload <= '0;
            end else begin
              counter     <= CNT_W'(conv_calc);
              conv_reload <= CNT_W'(conv_calc);
            end
            enabled     <= 1'b1;
            ready       <= 1'b0;
            state       <= ST_CONVERT_READY;
          end else begin
            state <= ST_INIT;
          end
        end

        ST_CONVERT_READY, ST_CONVERT, ST_CONVERT_WAIT: begin
          if (state == ST_CONVERT) begin
            sdl_data <= stored_pwdata[WORD_W-1:0];
            ready    <= 1'b0;
          end
          if (conv_finished) begin
            counter <= CNT_W'(bits_q - 1'b1);
            cs      <= 1'b0;
            sck     <= 1'b0;
            state   <= ST_TALK0;
          end else begin
            counter <= counter - CNT_W'(rate_q);
            unique case (state)
              ST_CONVERT_READY: state <= apb_write ? ST_CONVERT : ST_CONVERT_READY;
              default:          state <= ST_CONVERT_WAIT;
            endcase
          end
        end

        ST_TALK0: begin
          // Bit index counts down from bits-1; a word of `bits` bits is taken from the
          // top of the 24-bit shift source.
          sdi   <= sdl_data[WORD_W - 32'(bits_q) + 32'(counter)];
          state <= ST_TALK1;
        end

        ST_TALK1: state <= ST_TALK2;

        ST_TALK2: begin
          sck   <= 1'b1;
          state <= ST_TALK3;
        end

        ST_TALK3: state <= ST_TALK4;

        ST_TALK4: begin
          sdo_data[counter[$clog2(WORD_W)-1:0]] <= sdo;
          state <= ST_TALK5;
        end

        ST_TALK5: begin
          sck <= 1'b0;
          if (counter == '0) begin
            counter <= conv_reload;
            ready   <= 1'b1;
            cs      <= 1'b1;
            state   <= ST_CONVERT_READY;
          end else begin
            counter <= counter - 1'b1;
            state   <= ST_TALK0;
          end
        end

        default: state <= ST_INIT;
      endcase
    end
  end

  status_word_t status;
  always_comb begin
    status.ready    = ready;
    status.enabled  = enabled;
    status.state    = state;
    status.zero     = 1'b0;
    status.sdo_data = sdo_data;
  end
  assign prdata = status;

  // ------------------------------------------------------------------ bus and SPI rules
  // APB: an access starts with one setup clock (PSEL without PENABLE).
  a_apb_setup: assert property (@(posedge pclk) disable iff (!reset_n)
                                $rose(psel) |-> !penable)
    else $error("spi_apb: PENABLE high in the first clock of PSEL");
  // APB: write data is stable through the access phase.
  a_apb_stable: assert property (@(posedge pclk) disable iff (!reset_n)
                                 (psel && !penable && pwrite) |=> $stable(pwdata) || !psel)
    else $error("spi_apb: PWDATA changed between setup and access");
  // SPI: SCK only toggles while CS is low.
  a_sck_in_load: assert property (@(posedge pclk) disable iff (!reset_n)
                                  sck |-> !cs)
    else $error("spi_apb: SCK high while CS is high");

endmodule
