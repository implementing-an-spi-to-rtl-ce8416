// spi_top_tb: end-to-end testbench of the two-peripheral converter interface at its
// default parameters (30 MHz clock rate), with an LTC1865L-style ADC model on slot 13 and
// an LTC1654-style DAC model on slot 14. The testbench plays the processor: it drives the
// APB bus with tasks that write a word and poll PRDATA[31] (ready) before the next one.
//
// Phases (all at the sizes of the reference tests of this interface):
//  A. DAC: disable, enable at 50 ksamples/s with 24-bit words, both DACs to fast mode,
//     then 1000 writes of 0xDEAD to each DAC channel (2000 words), one sample deliberately
//     written late (dropped), then disable. Checks: every word arrives whole and equal to
//     what was written, both DAC registers end at 0xDEAD, fast mode on, 600 clocks between
//     DAC_LD falling edges, no SPI timing violation seen by the model.
//  B. ADC: enable at 50 ksamples/s with 16-bit words and read 1000 samples per channel,
//     alternating channel 0 and 1, of a 500 Hz sine sampled at 25 ksamples/s (channel 1
//     gets the inverted sine). Each value read back must equal the code the model
//     sampled; 600 clocks between AD_CONV_ST falling edges; conversions never shorter than
//     the ADC's 4.66 us.
//  C. ADC at 127 ksamples/s aggregate, the fastest the ADC conversion time allows:
//     236-clock period, conversion time still met.
//  D. DAC at 88.2 ksamples/s: 340-clock period.
//  E. Loop-back: disable both, enable the DAC then the ADC, DAC fast mode, then repeatedly
//     read ADC channel 1 and write it to DAC A, read channel 0 and write it to DAC B.
//     The DAC is enabled first, so its loads end 3 clocks before the ADC's and the DAC
//     write that follows the ADC's ready is always taken.
//     The DAC registers must follow the ADC codes, and the two peripherals must stay
//     locked: the distance between their CS falling edges never changes.
//  F. DAC sine playback: 2500 points of a 500 Hz sine to DAC A and DAC B, checked point by
//     point, lasting 100 ms (4999 periods from first to last word).
//  G. ADC capture of a 50 Hz tone: 25000 samples per channel at 50 ksamples/s aggregate,
//     every value checked, and the first 1000 channel-0 samples spanning exactly two
//     periods of the tone.
// Every mechanism is counted and must happen at least once: enable, disable, sample
// accepted, dropped sample (late write), 16-bit load, 24-bit load, rate change. The
// half-clock probe must toggle on every clock.
module spi_top_tb;
  import spi_apb_pkg::*;

  localparam longint CLK_HZ = 30_000_000;

  logic        pclk = 1'b0;
  logic        reset_n = 1'b0;
  logic        psel13 = 1'b0, psel14 = 1'b0, penable = 1'b0, pwrite = 1'b0;
  logic [31:0] pwdata = '0;
  logic [31:0] prdata13, prdata14;
  logic        ad_conv_st, spi_ad_sck, spi_ad_sdi, spi_ad_sdo;
  logic        dac_ld, spi_dac_clk, spi_dac_mosi, spi_dac_miso;
  logic        test_half_clk;
  logic [15:0] ain0 = '0, ain1 = '0;

  int checks = 0;
  int failures = 0;
  bit stopping = 1'b0;   // the result line is printed once

  spi_top dut (
    .pclk, .reset_n, .psel13, .psel14, .penable, .pwrite, .pwdata, .prdata13, .prdata14,
    .ad_conv_st, .spi_ad_sck, .spi_ad_sdi, .spi_ad_sdo,
    .dac_ld, .spi_dac_clk, .spi_dac_mosi, .spi_dac_miso,
    .test_half_clk
  );

  ltc1865l_model adc (
    .conv(ad_conv_st), .sck(spi_ad_sck), .sdi(spi_ad_sdi), .sdo(spi_ad_sdo), .ain0, .ain1
  );

  ltc1654_model dac (
    .cs_ld(dac_ld), .sck(spi_dac_clk), .sdi(spi_dac_mosi), .dout(spi_dac_miso)
  );

  always #16.667ns pclk = ~pclk;   // 30 MHz processor clock

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
      if (failures >= 1000 && !stopping) begin
        stopping = 1'b1;
        $display("too many failures, stopping");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  endtask

  // ---------------------------------------------------------------- APB master
  localparam bit ADC = 1'b0, DAC = 1'b1;

  task automatic apb_write(input bit slot, input logic [31:0] data);
    @(negedge pclk);
    psel13 = (slot == ADC); psel14 = (slot == DAC);
    pwrite = 1'b1; pwdata = data; penable = 1'b0;
    @(negedge pclk);
    penable = 1'b1;
    @(negedge pclk);
    psel13 = 1'b0; psel14 = 1'b0; penable = 1'b0; pwrite = 1'b0;
  endtask

  task automatic apb_read(input bit slot, output logic [31:0] data);
    @(negedge pclk);
    psel13 = (slot == ADC); psel14 = (slot == DAC);
    pwrite = 1'b0; penable = 1'b0;
    @(negedge pclk);
    penable = 1'b1;
    @(posedge pclk);
    data = (slot == ADC) ? prdata13 : prdata14;
    @(negedge pclk);
    psel13 = 1'b0; psel14 = 1'b0; penable = 1'b0;
  endtask

  task automatic wait_ready(input bit slot, output logic [31:0] data);
    do apb_read(slot, data); while (!data[31]);
  endtask

  function automatic logic [31:0] enable_word(input int rate, input int bits);
    return {1'b1, 1'b0, 8'h00, 17'(rate), 5'(bits)};
  endfunction
  localparam logic [31:0] DISABLE_WORD = 32'h4000_0000;

  // Converter command words (bits 23..20 control, 19..16 address, 15..0 data).
  function automatic logic [31:0] dac_word(input logic [3:0] ctrl, input logic [3:0] addr,
                                           input logic [15:0] data);
    return {8'h00, ctrl, addr, data};
  endfunction
  // ADC: the first two bits sent are SGL/DIFF = 1 and ODD = channel.
  function automatic logic [31:0] adc_word(input bit ch);
    return {8'h00, 1'b1, ch, 22'h0};
  endfunction

  // ---------------------------------------------------------------- mechanism counters
  int n_enable = 0, n_disable = 0, n_accepted = 0, n_dropped = 0;
  int n_load16 = 0, n_load24 = 0, n_rate_change = 0;

  // A load whose word was not written in time: the peripheral went from ConvertReady
  // straight to Talk0. Seen from outside as a load with no write since the previous one.
  bit adc_written = 1'b0, dac_written = 1'b0;
  bit adc_running = 1'b0, dac_running = 1'b0;
  always @(negedge ad_conv_st) if (reset_n && adc_running) begin
    if (!adc_written) n_dropped++;
    adc_written = 1'b0;
  end
  always @(negedge dac_ld) if (reset_n && dac_running) begin
    if (!dac_written) n_dropped++;
    dac_written = 1'b0;
  end
  always @(posedge ad_conv_st) if (reset_n && adc_running) n_load16++;
  always @(posedge dac_ld)     if (reset_n && dac_running) n_load24++;

  // ---------------------------------------------------------------- period monitors
  longint cycle = 0;
  longint adc_fall = -1, dac_fall = -1;
  int     adc_period = 0, dac_period = 0;   // expected; 0 = do not check
  int     adc_periods = 0, dac_periods = 0;
  logic   ad_q = 1'b1, dl_q = 1'b1, half_q = 1'b0;
  longint lock_offset = -1;
  bit     check_lock = 1'b0;
  int     lock_checks = 0;

  always @(posedge pclk) begin
    cycle++;
    if (reset_n) begin
      if (cycle > 4) check(test_half_clk != half_q, "half-clock probe toggles every clock");
      if (ad_q && !ad_conv_st) begin
        if (adc_fall >= 0 && adc_period != 0) begin
          check(cycle - adc_fall == longint'(adc_period),
                $sformatf("ADC period %0d, expected %0d", cycle - adc_fall, adc_period));
          adc_periods++;
        end
        adc_fall = cycle;
        if (check_lock && dac_fall >= 0) begin
          if (lock_offset < 0) lock_offset = cycle - dac_fall;
          else begin
            check(cycle - dac_fall == lock_offset, "ADC and DAC stay locked");
            lock_checks++;
          end
        end
      end
      if (dl_q && !dac_ld) begin
        if (dac_fall >= 0 && dac_period != 0) begin
          check(cycle - dac_fall == longint'(dac_period),
                $sformatf("DAC period %0d, expected %0d", cycle - dac_fall, dac_period));
          dac_periods++;
        end
        dac_fall = cycle;
      end
    end
    ad_q   = ad_conv_st;
    dl_q   = dac_ld;
    half_q = test_half_clk;
  end

  // Period from the counter rule: floor((clk - r - 6*b*r)/r) + 1 + 6*b clocks.
  function automatic int period_of(input int rate_i, input int bits_i);
    longint rate, bits;
    longint c0;
    rate = longint'(rate_i);
    bits = longint'(bits_i);
    c0 = CLK_HZ - rate - 6 * bits * rate;
    if (c0 < 0) c0 = 0;
    return int'(c0 / rate + 1 + 6 * bits);
  endfunction

  // ---------------------------------------------------------------- analog stimulus
  // A sine of tone_hz, tone_sps points per second, scaled to 0..65535; channel 1 gets
  // the inverted sine. The input index advances at every falling AD_CONV_ST (one per
  // sample period), so the value the ADC samples at the next rising edge is known here.
  // Default: 500 Hz at 25 ksamples/s, the reference simulation's test tone.
  int  n_fall = 0;
  real tone_hz = 500.0;
  real tone_sps = 25000.0;
  function automatic logic [15:0] sine_code(input int k);
    real v;
    v = ($sin(real'(k) / tone_sps * tone_hz * 2.0 * 3.14159265358979) + 1.0) / 2.0 * 65535.0;
    return 16'($rtoi(v + 0.5));
  endfunction
  always @(negedge ad_conv_st) if (reset_n) begin
    n_fall++;
    ain0 = sine_code(n_fall);
    ain1 = 16'hffff - sine_code(n_fall);
  end

  // ---------------------------------------------------------------- phases
  task automatic enable(input bit slot, input int rate, input int bits);
    apb_write(slot, enable_word(rate, bits));
    n_enable++;
    if (slot == ADC) begin adc_running = 1'b1; adc_written = 1'b1; adc_fall = -1; adc_period = period_of(rate, bits); end
    else             begin dac_running = 1'b1; dac_written = 1'b1; dac_fall = -1; dac_period = period_of(rate, bits); end
  endtask

  task automatic disable_(input bit slot);
    logic [31:0] st;
    if (slot == ADC) begin adc_running = 1'b0; adc_period = 0; end
    else             begin dac_running = 1'b0; dac_period = 0; end
    apb_write(slot, DISABLE_WORD);
    n_disable++;
    repeat (2) @(posedge pclk);
    apb_read(slot, st);
    check(st[31] && !st[30] && st[29:25] == ST_INIT, $sformatf("status after disable %h", st));
  endtask

  task automatic write_sample(input bit slot, input logic [31:0] w);
    apb_write(slot, w);
    n_accepted++;
    if (slot == ADC) adc_written = 1'b1; else dac_written = 1'b1;
  endtask

  task automatic phase_dac(input int rate, input int per_channel, input bit with_drop);
    logic [31:0] st;
    int words0;
    disable_(DAC);
    wait_ready(DAC, st);
    enable(DAC, rate, 24);
    wait_ready(DAC, st);
    write_sample(DAC, dac_word(4'b1100, 4'hf, 16'h0));   // both DACs to fast mode
    wait_ready(DAC, st);
    check(dac.fast[0] && dac.fast[1], "DAC fast mode set");
    words0 = dac.words;
    for (int i = 0; i < 2 * per_channel; i++) begin
      write_sample(DAC, dac_word(4'b0011, 4'(i % 2), 16'hdead));
      wait_ready(DAC, st);
      check(dac.last_word == {4'b0011, 4'(i % 2), 16'hdead},
            $sformatf("DAC word %h", dac.last_word));
      // The DAC's daisy-chain output returns the previous word on the same load.
      check(st[23:0] == ((i == 0) ? {4'b1100, 4'hf, 16'h0} : {4'b0011, 4'((i - 1) % 2), 16'hdead}),
            $sformatf("DAC read-back %h", st[23:0]));
      if (with_drop && i == per_channel) begin
        // Let one whole period pass without a new word: that sample is dropped.
        @(negedge dac_ld); @(posedge dac_ld);
        wait_ready(DAC, st);
      end
    end
    check(dac.dac_value[0] == 16'hdead && dac.dac_value[1] == 16'hdead, "DAC registers hold DEAD");
    check(dac.words - words0 >= 2 * per_channel, "all DAC words executed");
    check(dac.bad_length == 0 && dac.timing_errors == 0,
          $sformatf("DAC model bad_length=%0d timing=%0d", dac.bad_length, dac.timing_errors));
    disable_(DAC);
  endtask

  logic [15:0] ch0_codes [$];   // channel 0 values read in the last ADC phase

  task automatic phase_adc(input int rate, input int per_channel);
    logic [31:0] st;
    logic [15:0] expect_code;
    bit          prev_ch;
    int          prev_fall;
    ch0_codes.delete();
    disable_(ADC);
    wait_ready(ADC, st);
    enable(ADC, rate, 16);
    wait_ready(ADC, st);
    // Prime: request channel 0.
    write_sample(ADC, adc_word(1'b0));
    wait_ready(ADC, st);
    prev_ch   = 1'b0;
    prev_fall = n_fall;
    for (int i = 0; i < 2 * per_channel; i++) begin
      bit ch;
      ch = bit'((i + 1) % 2);
      // The word written now goes out on the next load; this load returns the
      // conversion requested by the previous word, sampled after the last load.
      write_sample(ADC, adc_word(ch));
      wait_ready(ADC, st);
      expect_code = prev_ch ? 16'hffff - sine_code(prev_fall) : sine_code(prev_fall);
      check(st[15:0] == expect_code,
            $sformatf("ADC sample %0d ch%0d read %h expected %h", i, prev_ch, st[15:0], expect_code));
      if (!prev_ch) ch0_codes.push_back(st[15:0]);
      prev_ch   = ch;
      prev_fall = n_fall;
    end
    check(adc.short_conv == 0 && adc.timing_errors == 0 && adc.bad_length == 0,
          $sformatf("ADC model short=%0d timing=%0d len=%0d", adc.short_conv, adc.timing_errors,
                    adc.bad_length));
    disable_(ADC);
  endtask

  // DAC sine playback: 2500 points of a 500 Hz sine at 25 ksamples/s to DAC A and DAC B
  // (5000 words at 50 ksamples/s aggregate). Each DAC register must take every point, and
  // the playback must last 100 ms: 4999 periods of 600 clocks from first to last word.
  task automatic phase_dac_sine(input int points);
    logic [31:0] st;
    longint      t_first, t_last;
    tone_hz  = 500.0;
    tone_sps = 25000.0;
    disable_(DAC);
    wait_ready(DAC, st);
    enable(DAC, 50_000, 24);
    wait_ready(DAC, st);
    write_sample(DAC, dac_word(4'b1100, 4'hf, 16'h0));
    wait_ready(DAC, st);
    t_first = 0;
    t_last  = 0;
    for (int i = 0; i < points; i++) begin
      for (int ch = 0; ch < 2; ch++) begin
        write_sample(DAC, dac_word(4'b0011, 4'(ch), sine_code(i)));
        @(posedge dac_ld);
        #1ns;
        if (i == 0 && ch == 0) t_first = cycle;
        t_last = cycle;
        check(dac.dac_value[ch] == sine_code(i),
              $sformatf("sine point %0d DAC %0d = %h, expected %h", i, ch, dac.dac_value[ch], sine_code(i)));
        wait_ready(DAC, st);
      end
    end
    check(t_last - t_first == longint'(2 * points - 1) * 600,
          $sformatf("sine playback lasted %0d clocks", t_last - t_first));
    $display("DAC sine playback: %0d words over %0d clocks (%0.3f ms)", 2 * points,
             t_last - t_first, real'(t_last - t_first) / 30.0e3);
    disable_(DAC);
  endtask

  task automatic phase_loopback(input int rate, input int iterations);
    logic [31:0] st;
    logic [15:0] code;
    disable_(DAC);
    disable_(ADC);
    // Each peripheral ends its loads at enable time + whole periods, whatever the word
    // length. Enabling the DAC first therefore makes its load end just before the ADC's,
    // so a DAC write issued when the ADC signals ready finds the DAC in ConvertReady.
    enable(DAC, rate, 24);
    enable(ADC, rate, 16);
    check_lock = 1'b1;
    lock_offset = -1;
    wait_ready(DAC, st);
    write_sample(DAC, dac_word(4'b1100, 4'hf, 16'h0));
    wait_ready(ADC, st);
    write_sample(ADC, adc_word(1'b1));
    for (int i = 0; i < iterations; i++) begin
      wait_ready(ADC, st);
      code = st[15:0];
      write_sample(DAC, dac_word(4'b0011, 4'(i % 2), code));
      write_sample(ADC, adc_word(bit'(i % 2)));
      if (i > 0) begin
        @(posedge dac_ld);
        #1ns;   // let the DAC model execute the word first
        check(dac.dac_value[i % 2] == code,
              $sformatf("loop-back DAC %0d = %h, ADC read %h", i % 2, dac.dac_value[i % 2], code));
      end
    end
    check_lock = 1'b0;
    check(lock_checks > 0, "lock checked");
    disable_(DAC);
    disable_(ADC);
  endtask

  initial begin
    repeat (4) @(posedge pclk);
    reset_n = 1'b1;

    phase_dac(50_000, 1000, 1'b1);      // A
    phase_adc(50_000, 1000);            // B
    n_rate_change++;
    phase_adc(127_000, 100);            // C
    n_rate_change++;
    phase_dac(88_200, 50, 1'b0);        // D
    phase_loopback(50_000, 200);        // E
    phase_dac_sine(2500);               // F
    // G: ADC capture of a 50 Hz tone, 25000 samples per channel at 50 ksamples/s
    // aggregate. The first 1000 channel-0 samples must span exactly two periods of the
    // tone (500 samples per period): two upward crossings of mid-scale and the same code
    // (within 1 LSB of rounding) at samples 0, 500 and 1000.
    tone_hz  = 50.0;
    tone_sps = 50000.0;
    phase_adc(50_000, 25000);
    begin
      int ups;
      ups = 0;
      for (int j = 1; j < 1000; j++)
        if (ch0_codes[j-1] < 16'h8000 && ch0_codes[j] >= 16'h8000) ups++;
      check(ups == 2, $sformatf("50 Hz tone: %0d upward crossings in 1000 samples", ups));
      check(ch0_codes[0] - ch0_codes[500] + 1 <= 2 && ch0_codes[0] - ch0_codes[1000] + 1 <= 2,
            $sformatf("50 Hz tone period: %h %h %h", ch0_codes[0], ch0_codes[500], ch0_codes[1000]));
    end

    $display("mechanisms: enable=%0d disable=%0d accepted=%0d dropped=%0d load16=%0d load24=%0d rate_change=%0d",
             n_enable, n_disable, n_accepted, n_dropped, n_load16, n_load24, n_rate_change);
    $display("periods checked: ADC %0d DAC %0d, lock checks %0d", adc_periods, dac_periods, lock_checks);
    check(n_enable > 0, "enable happened");
    check(n_disable > 0, "disable happened");
    check(n_accepted > 0, "sample accepted");
    check(n_dropped > 0, "dropped sample happened");
    check(n_load16 > 0, "16-bit load happened");
    check(n_load24 > 0, "24-bit load happened");
    check(n_rate_change > 0, "rate change happened");
    check(adc_periods > 2000 && dac_periods > 2000, "periods checked");
    if (!stopping) begin
      stopping = 1'b1;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    end
    $finish;
  end

  initial begin
    repeat (40_000_000) @(posedge pclk);
    if (!stopping) begin
      stopping = 1'b1;
      failures++;
      $display("FAIL watchdog");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    end
    $finish;
  end
endmodule
