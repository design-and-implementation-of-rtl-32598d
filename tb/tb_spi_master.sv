// tb_spi_master: self-checking test of the SPI mode 0 byte master at its
// default 100 MHz / ~3 MHz setting.
//
// A mode 0 slave written in the testbench samples MOSI on each rising SCLK
// edge and changes MISO after each falling edge (first bit ready when chip
// select falls).  The test sends single-byte frames and two-byte frames with
// random data in both directions and checks: the bytes each side received,
// SCLK idle low, 8 SCLK cycles per byte, an SCLK period of 34 clocks
// (HALF = ceil(100e6 / 6e6) = 17), MOSI stable while SCLK is high, chip select
// held low across a two-byte frame and released after the last byte, and
// ready/done behaviour.
module tb_spi_master;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       start = 1'b0, last = 1'b0;
  logic [7:0] tx_byte = '0;
  logic       ready, done, sclk, mosi, miso, cs_n;
  logic [7:0] rx_byte;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  spi_master dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // testbench slave
  logic [7:0] s_out, s_in;
  int         s_bits;
  initial miso = 1'b0;
  always @(negedge cs_n) begin
    miso   = s_out[7];
    s_bits = 0;
  end
  always @(posedge sclk) begin
    s_in = {s_in[6:0], mosi};
    s_bits++;
  end
  always @(negedge sclk) if (!cs_n) begin
    s_out = {s_out[6:0], 1'b0};
    miso  = s_out[7];
  end

  // CS setup (CS fall to first SCLK rise) and hold (last SCLK fall to CS rise)
  int cyc2 = 0, t_csfall = 0, t_fall = 0, bad_setup = 0, bad_hold = 0, n_setup = 0, n_hold = 0;
  logic cs_q2 = 1'b1, sclk_q2 = 1'b0;
  bit first_edge = 0;
  always @(posedge clk) begin
    cyc2++;
    cs_q2   <= cs_n;
    sclk_q2 <= sclk;
    if (cs_q2 && !cs_n) begin t_csfall = cyc2; first_edge = 1; end
    if (sclk && !sclk_q2 && first_edge) begin
      n_setup++;
      if (cyc2 - t_csfall != 17) bad_setup++;
      first_edge = 0;
    end
    if (!sclk && sclk_q2) t_fall = cyc2;
    if (!cs_q2 && cs_n && rst_n) begin
      n_hold++;
      if (cyc2 - t_fall != 17) bad_hold++;
    end
  end

  // timing monitor
  int   t_rise = 0, cyc = 0, bad_period = 0, periods = 0, mosi_changes_high = 0;
  logic sclk_q = 1'b0, mosi_q = 1'b0;
  always @(posedge clk) begin
    cyc++;
    sclk_q <= sclk;
    mosi_q <= mosi;
    if (sclk && !sclk_q) begin
      if (t_rise != 0 && !cs_n && (cyc - t_rise) < 40) begin
        periods++;
        if (cyc - t_rise != 34) bad_period++;
      end
      t_rise = cyc;
    end
    if (sclk && sclk_q && mosi != mosi_q) mosi_changes_high++;
    if (cs_n && sclk) failures++;
  end

  task automatic xfer(input logic [7:0] m, input logic [7:0] s, input bit is_last,
                      input bit first);
    s_out = s;
    wait (ready);
    @(posedge clk);
    start   <= 1'b1;
    tx_byte <= m;
    last    <= is_last;
    @(posedge clk);
    start <= 1'b0;
    if (!first) miso = s_out[7];
    while (!done) @(posedge clk);
    check(rx_byte == s, $sformatf("master got %h expected %h", rx_byte, s));
    check(s_in == m, $sformatf("slave got %h expected %h", s_in, m));
    check(s_bits == 8, $sformatf("%0d SCLK cycles in byte", s_bits));
    check(!cs_n, "CS low at end of byte");
    s_bits = 0;
  endtask

  initial begin
    logic [7:0] a, b, c, d;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check(cs_n && !sclk && ready, "idle after reset");
    for (int k = 0; k < 6; k++) begin
      a = 8'($urandom); b = 8'($urandom); c = 8'($urandom); d = 8'($urandom);
      // two-byte frame
      xfer(a, b, 1'b0, 1'b1);
      repeat (3) @(posedge clk);
      check(!cs_n && ready, "CS held low between bytes of a frame");
      xfer(c, d, 1'b1, 1'b0);
      @(posedge clk);
      check(!ready, "not ready during CS hold");
      wait (cs_n);
      check(!ready, "not ready right after CS release");
      wait (ready);
      check(cs_n, "CS high when idle");
      // one-byte frame
      xfer(d, a, 1'b1, 1'b1);
      wait (ready);
    end
    check(periods > 50 && bad_period == 0,
          $sformatf("%0d of %0d SCLK periods not 34 clocks", bad_period, periods));
    check(n_setup == 12 && bad_setup == 0, $sformatf("CS setup wrong in %0d of %0d frames", bad_setup, n_setup));
    check(n_hold == 12 && bad_hold == 0, $sformatf("CS hold wrong in %0d of %0d frames", bad_hold, n_hold));
    check(mosi_changes_high == 0, "MOSI changed while SCLK high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
