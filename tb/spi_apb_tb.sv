// spi_apb_tb: self-checking testbench of the APB-to-SPI converter peripheral at its
// default 30 MHz clock rate.
//
// An APB master task writes and reads the peripheral the way the processor software does
// (write a word, poll PRDATA[31] until ready, read, write the next word). A small SPI
// slave in the testbench records every bit on SDI at rising SCK edges and answers with a
// fresh random word on SDO, changing it after falling SCK edges. A clock-level monitor
// measures the SPI waveform in processor clocks. Checked:
//  * PRDATA after reset, after enable and after disable (ready, enabled, state fields);
//  * each load sends exactly `bits` bits, equal to PWDATA[23 -: bits] of the last word;
//  * the word the slave sent is returned in PRDATA[bits-1:0];
//  * CS falls to first SCK rise = 3 clocks, SCK low = 3 and high = 3 clocks;
//  * the sample period (CS fall to CS fall) equals clk/rate - 6*bits rounded as the
//    counter formula gives, plus 6*bits: 600 clocks at 50 ksamples/s;
//  * a word written too late is dropped and the previous word is sent again, without
//    changing the period;
//  * 24-bit (DAC) and 16-bit (ADC) word lengths and three sample rates.
module spi_apb_tb;
  import spi_apb_pkg::*;

  localparam longint CLK_HZ = 30_000_000;

  logic        pclk = 1'b0;
  logic        reset_n = 1'b0;
  logic        psel = 1'b0, penable = 1'b0, pwrite = 1'b0;
  logic [31:0] pwdata = '0;
  logic [31:0] prdata;
  logic        cs, sck, sdi;
  logic        sdo = 1'b0;

  int checks = 0;
  int failures = 0;

  spi_apb dut (
    .pclk, .reset_n, .psel, .penable, .pwrite, .pwdata, .prdata,
    .cs, .sck, .sdi, .sdo
  );

  always #16.5ns pclk = ~pclk;   // 33 ns processor clock

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------------------------------------------------------- APB master
  task automatic apb_write(input logic [31:0] data);
    @(negedge pclk);
    psel = 1'b1; pwrite = 1'b1; pwdata = data; penable = 1'b0;
    @(negedge pclk);
    penable = 1'b1;
    @(negedge pclk);
    psel = 1'b0; penable = 1'b0; pwrite = 1'b0;
  endtask

  task automatic apb_read(output logic [31:0] data);
    @(negedge pclk);
    psel = 1'b1; pwrite = 1'b0; penable = 1'b0;
    @(negedge pclk);
    penable = 1'b1;
    @(posedge pclk);
    data = prdata;
    @(negedge pclk);
    psel = 1'b0; penable = 1'b0;
  endtask

  task automatic wait_ready(output logic [31:0] data);
    do apb_read(data); while (!data[31]);
  endtask

  function automatic logic [31:0] cfg_word(input int rate, input int bits);
    return {1'b1, 1'b0, 8'h00, 17'(rate), 5'(bits)};
  endfunction

  // ---------------------------------------------------------------- SPI slave
  logic [23:0] rx_shift;
  int          rx_bits;
  logic [23:0] tx_word, tx_shift;
  logic [23:0] last_rx;       // word received in the last completed load
  int          last_rx_bits;
  logic [23:0] last_tx;       // word sent in the last completed load
  int          loads = 0;

  initial begin
    rx_shift = '0; rx_bits = 0; tx_word = '0; tx_shift = '0;
    last_rx = '0; last_rx_bits = 0; last_tx = '0;
  end

  always @(negedge cs) begin
    rx_bits  = 0;
    rx_shift = '0;
    tx_word  = 24'($urandom);
    tx_shift = tx_word;
    sdo      = tx_shift[23];
  end
  always @(posedge sck) if (!cs) begin
    rx_shift = {rx_shift[22:0], sdi};
    rx_bits++;
  end
  always @(negedge sck) if (!cs) begin
    tx_shift = {tx_shift[22:0], 1'b0};
    sdo <= #20ns tx_shift[23];
  end
  always @(posedge cs) if (reset_n) begin
    last_rx      = rx_shift;
    last_rx_bits = rx_bits;
    last_tx      = tx_word;
    loads++;
  end

  // ---------------------------------------------------------------- clock-level monitor
  longint cycle = 0;
  longint last_cs_fall = -1;
  int     expect_period = 0;      // 0: do not check
  int     periods_checked = 0;
  int     sck_run = 0;            // clocks since the last SCK/CS change
  logic   cs_q = 1'b1, sck_q = 1'b0;
  bit     first_rise = 1'b0;

  always @(posedge pclk) begin
    cycle++;
    if (reset_n) begin
      if (cs_q && !cs) begin
        if (last_cs_fall >= 0 && expect_period != 0) begin
          check(cycle - last_cs_fall == longint'(expect_period),
                $sformatf("sample period %0d, expected %0d", cycle - last_cs_fall, expect_period));
          periods_checked++;
        end
        last_cs_fall = cycle;
        first_rise   = 1'b1;
        sck_run      = 0;
      end else if (!cs && sck != sck_q) begin
        if (sck && first_rise)
          check(sck_run + 1 == 3, $sformatf("CS fall to SCK rise %0d clocks", sck_run + 1));
        else
          check(sck_run + 1 == 3, $sformatf("SCK %s for %0d clocks", sck ? "low" : "high", sck_run + 1));
        first_rise = 1'b0;
        sck_run    = 0;
      end else begin
        sck_run++;
      end
      cs_q  = cs;
      sck_q = sck;
    end
  end

  // Sample period from the counter rule, worked out here: the convert phase lasts
  // floor((clk - rate - 6*bits*rate) / rate) + 1 clocks, the load phase 6*bits clocks.
  function automatic int period_of(input int rate_i, input int bits_i);
    longint rate, bits;
    longint c0;
    rate = longint'(rate_i);
    bits = longint'(bits_i);
    c0 = CLK_HZ - rate - 6 * bits * rate;
    if (c0 < 0) c0 = 0;
    return int'(c0 / rate + 1 + 6 * bits);
  endfunction

  // Enable, then stream n words with ready polling and check each load.
  task automatic stream(input int rate, input int bits, input int n);
    logic [31:0] st;
    logic [31:0] w;
    logic [23:0] mask;
    int          loads0;
    mask = (bits >= 24) ? 24'hffffff : ((24'h1 << bits) - 24'h1);

    apb_write(cfg_word(rate, bits));
    apb_read(st);
    check(st[31] == 1'b0 && st[30] == 1'b1 && st[29:25] == ST_CONVERT_READY,
          $sformatf("status after enable %h", st));
    expect_period = period_of(rate, bits);
    last_cs_fall  = -1;

    for (int i = 0; i < n; i++) begin
      wait_ready(st);
      check(st[23:0] == (last_tx >> (24 - bits)),
            $sformatf("read-back %h, slave sent %h", st[23:0], last_tx >> (24 - bits)));
      check(last_rx_bits == bits, $sformatf("load of %0d bits, expected %0d", last_rx_bits, bits));
      w = {8'h00, 24'($urandom)};
      apb_write(w);
      loads0 = loads;
      wait (loads == loads0 + 1);
      check((last_rx & mask) == (w[23:0] >> (24 - bits)),
            $sformatf("slave got %h, expected %h", last_rx & mask, w[23:0] >> (24 - bits)));
    end

    // Dropped sample: no word for two periods; the last word is sent again.
    loads0 = loads;
    wait (loads == loads0 + 2);
    check((last_rx & mask) == (w[23:0] >> (24 - bits)), "dropped sample repeats last word");
    check(last_rx_bits == bits, "dropped sample load length");
  endtask

  task automatic disable_and_check();
    logic [31:0] st;
    apb_write(32'h4000_0000);
    repeat (2) @(posedge pclk);
    apb_read(st);
    check(st[31] == 1'b1 && st[30] == 1'b0 && st[29:25] == ST_INIT && cs == 1'b1,
          $sformatf("status after disable %h cs=%b", st, cs));
    repeat (700) @(posedge pclk);
    check(cs == 1'b1 && sck == 1'b0, "no SPI activity while disabled");
  endtask

  initial begin
    logic [31:0] st;
    repeat (4) @(posedge pclk);
    reset_n = 1'b1;
    apb_read(st);
    check(st[31] == 1'b1 && st[30] == 1'b0 && st[29:25] == ST_INIT, $sformatf("status after reset %h", st));
    // A write without the enable bit leaves the peripheral in Init.
    apb_write(32'h0000_1234);
    repeat (2) @(posedge pclk);
    apb_read(st);
    check(st[29:25] == ST_INIT && st[30] == 1'b0, "non-enable word ignored");

    stream(50_000, 24, 12);        // DAC setting of the design: 600-clock period
    disable_and_check();
    stream(50_000, 16, 8);         // ADC setting of the design
    disable_and_check();
    stream(127_000, 16, 8);        // highest rate the ADC timing allows
    disable_and_check();
    stream(100_000, 24, 6);

    check(periods_checked > 30, $sformatf("periods checked %0d", periods_checked));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge pclk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
