// tb_mfrc522_controller: end-to-end test of the RFID access controller with
// every parameter at its default (100 MHz clock, ~3 MHz SCLK, stored UID
// 0xDEADBEEF), talking to the behavioural MFRC522 model.
//
// Scenarios: the authorised card (LED on), a foreign card (LED off), the
// authorised card again, no card at all (REQA unanswered, poll limit reached,
// LED off), a card whose BCC is corrupt (LED off), and two back-to-back reads
// with scan_start held high.  Expected UIDs and LED states come from the
// scenario table, not from the design.  Also checked: SCLK idles low, one SCLK
// period is 2*ceil(100 MHz / 6 MHz) = 34 clocks, every chip-select frame holds
// exactly 16 SCLK cycles (address byte + data byte), the model sees no framing
// error, and each mechanism (soft reset, antenna on, REQA, IRQ polling,
// anticollision, grant, deny, no-card timeout, BCC error, continuous scan) is
// seen at least once.
module tb_mfrc522_controller;

  localparam logic [31:0] GOOD_UID = 32'hDEAD_BEEF;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        scan_start = 1'b0;
  logic        miso, mosi, sclk, cs_n, busy, led, uid_valid;
  logic [31:0] uid;

  logic        card_present = 1'b0;
  logic [31:0] card_uid = '0;
  logic        bad_bcc = 1'b0;
  int          proto_errors, soft_resets, reqa_seen, anticoll_seen, irq_reads;

  int checks = 0, failures = 0;
  int n_grant = 0, n_deny = 0, n_nocard = 0, n_bccerr = 0, n_cont = 0;
  int n_uid_valid = 0;
  logic [31:0] last_uid_valid;

  always #5 clk = ~clk;

  mfrc522_controller dut (
    .clk, .rst_n, .scan_start, .miso, .mosi, .sclk, .cs_n,
    .busy, .led, .uid, .uid_valid
  );

  mfrc522_model #(.RESP_DELAY(20000)) card (
    .sclk, .mosi, .cs_n, .miso, .card_present, .card_uid, .bad_bcc,
    .proto_errors, .soft_resets, .reqa_seen, .anticoll_seen, .irq_reads
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // SPI line monitor
  int clk_since_rise = 0, edges_in_frame = 0, frames = 0;
  int bad_period = 0, bad_frame = 0, idle_high = 0, periods = 0;
  logic sclk_q = 1'b0, cs_q = 1'b1;
  always @(posedge clk) begin
    sclk_q <= sclk;
    cs_q   <= cs_n;
    clk_since_rise <= clk_since_rise + 1;
    if (sclk && !sclk_q) begin
      if (edges_in_frame > 0 && edges_in_frame != 8) begin
        periods++;
        if (clk_since_rise != 34) bad_period++;
      end
      clk_since_rise <= 1;
      edges_in_frame <= edges_in_frame + 1;
    end
    if (cs_n && sclk) idle_high++;
    if (!cs_q && cs_n && rst_n) begin
      frames++;
      if (edges_in_frame != 16) bad_frame++;
    end
    if (cs_q && !cs_n) edges_in_frame <= 0;
  end

  always @(posedge clk) if (uid_valid) begin
    n_uid_valid++;
    last_uid_valid <= uid;
  end

  // One scan: pulse scan_start, wait for the controller to come back idle.
  task automatic scan(input bit present, input logic [31:0] cuid, input bit corrupt,
                      input bit exp_valid, input bit exp_led, input string name);
    int n_before;
    logic [31:0] uid_before;
    n_before       = n_uid_valid;
    uid_before   = uid;
    card_present = present;
    card_uid     = cuid;
    bad_bcc      = corrupt;
    wait (!busy);
    @(posedge clk) scan_start <= 1'b1;
    @(posedge clk) scan_start <= 1'b0;
    wait (busy);
    wait (!busy);
    repeat (2) @(posedge clk);
    check(led == exp_led, $sformatf("%s: led=%0b expected %0b", name, led, exp_led));
    check((n_uid_valid - n_before) == (exp_valid ? 1 : 0),
          $sformatf("%s: %0d uid_valid pulses", name, n_uid_valid - n_before));
    if (exp_valid) begin
      check(uid == cuid, $sformatf("%s: uid %h expected %h", name, uid, cuid));
      check(last_uid_valid == cuid, $sformatf("%s: uid at uid_valid %h", name, last_uid_valid));
    end else begin
      check(uid == uid_before, $sformatf("%s: uid changed to %h", name, uid));
    end
    if (exp_valid && exp_led) n_grant++;
    if (exp_valid && !exp_led) n_deny++;
    if (!present) n_nocard++;
    if (present && corrupt) n_bccerr++;
  endtask

  initial begin
    int soft0, reqa0, anti0, irq0;
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check(!led, "LED dark after reset");
    check(cs_n && !sclk, "SPI idle after reset");
    wait (!busy);
    check(soft_resets == 1, "one soft reset at start-up");
    check(card.tx_control[1:0] == 2'b11, "antenna switched on");
    check(card.tx_control[7] == 1'b1, "TxControlReg upper bits kept");

    soft0 = soft_resets; reqa0 = reqa_seen; anti0 = anticoll_seen; irq0 = irq_reads;
    scan(1'b1, GOOD_UID, 1'b0, 1'b1, 1'b1, "authorised card");
    check(reqa_seen == reqa0 + 1, "REQA sent once");
    check(anticoll_seen == anti0 + 1, "anticollision sent once");
    check(irq_reads - irq0 >= 4, "CommIrqReg polled repeatedly");
    check(soft_resets == soft0 + 1, "reader reset after the read");

    scan(1'b1, 32'h1234_5678, 1'b0, 1'b1, 1'b0, "foreign card");
    scan(1'b1, GOOD_UID, 1'b0, 1'b1, 1'b1, "authorised card again");
    anti0 = anticoll_seen;
    scan(1'b0, GOOD_UID, 1'b0, 1'b0, 1'b0, "no card");
    check(anticoll_seen == anti0, "no anticollision without a card");
    scan(1'b1, GOOD_UID, 1'b0, 1'b1, 1'b1, "authorised card n_before BCC test");
    scan(1'b1, GOOD_UID ^ 32'h0000_0100, 1'b1, 1'b0, 1'b0, "corrupt BCC");

    // continuous scanning with scan_start held high
    card_present = 1'b1;
    card_uid     = GOOD_UID;
    bad_bcc      = 1'b0;
    begin
      int n_before;
      n_before = n_uid_valid;
      @(posedge clk) scan_start <= 1'b1;
      wait (n_uid_valid == n_before + 2);
      @(posedge clk) scan_start <= 1'b0;
      n_cont = n_uid_valid - n_before;
      wait (!busy);
      repeat (2) @(posedge clk);
      check(led, "LED on after continuous reads");
    end

    check(proto_errors == 0, $sformatf("%0d SPI framing errors", proto_errors));
    check(bad_period == 0 && periods > 0, $sformatf("%0d of %0d SCLK periods not 34 clocks", bad_period, periods));
    check(bad_frame == 0 && frames > 0, $sformatf("%0d of %0d frames without 16 SCLK cycles", bad_frame, frames));
    check(idle_high == 0, "SCLK high while CS released");
    // every mechanism seen
    check(soft_resets > 0, "mechanism: soft reset");
    check(reqa_seen > 0, "mechanism: REQA");
    check(anticoll_seen > 0, "mechanism: anticollision");
    check(irq_reads > reqa_seen + anticoll_seen, "mechanism: IRQ polling");
    check(n_grant > 0, "mechanism: access granted");
    check(n_deny > 0, "mechanism: access denied");
    check(n_nocard > 0, "mechanism: no-card timeout");
    check(n_bccerr > 0, "mechanism: BCC error");
    check(n_cont == 2, "mechanism: continuous scanning");
    $display("mechanisms: soft_reset=%0d reqa=%0d anticoll=%0d irq_polls=%0d grant=%0d deny=%0d nocard=%0d bcc_err=%0d continuous=%0d frames=%0d",
             soft_resets, reqa_seen, anticoll_seen, irq_reads, n_grant, n_deny, n_nocard, n_bccerr, n_cont, frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
