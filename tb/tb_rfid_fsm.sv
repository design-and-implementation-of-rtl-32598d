// tb_rfid_fsm: self-checking test of the RFID controller FSM at the level of
// register accesses.
//
// The testbench answers the FSM's register port itself: each request is
// logged and acknowledged 1-5 clocks later with read data from a small
// scripted reader (TxControlReg reads 0x80, CommIrqReg shows RxIRq after a
// chosen number of polls, FIFOLevelReg and FIFODataReg return the ATQA or the
// UID bytes and BCC).  uid_match is computed in the testbench.  The logged
// access sequence of a full card read is compared with the expected one
// written out below, and the scenarios authorised card, foreign card, no card
// (poll limit), wrong FIFO level, bad BCC and ErrIRq check uid, uid_valid,
// decide/granted, busy and the state numbers given for RESET, ANTENNA_ON,
// WAIT_START, DONE and ERROR.  RESET_WAIT_CYCLES and IRQ_POLL_LIMIT are
// shortened to keep the run short; the reset wait is checked to last at least
// RESET_WAIT_CYCLES clocks.
module tb_rfid_fsm;
  import rfid_pkg::*;

  localparam int          RW     = 40;
  localparam int          PL     = 6;
  localparam logic [31:0] STORED = 32'hDEAD_BEEF;

  logic        clk = 1'b0, rst_n = 1'b0, scan_start = 1'b0;
  logic        reg_req, reg_done = 1'b0;
  reg_op_t     reg_op;
  logic [7:0]  reg_rdata = '0;
  logic        uid_match;
  logic [31:0] uid;
  logic        uid_valid, decide, granted, busy;
  state_t      state;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rfid_fsm #(.RESET_WAIT_CYCLES(RW), .IRQ_POLL_LIMIT(PL)) dut (.*);

  assign uid_match = (uid == STORED);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // scripted reader
  logic [31:0] card_uid;
  bit          card_present, bad_bcc, err_irq;
  int          polls_to_answer, wrong_level;
  int          polls, phase;        // phase 1 = after REQA, 2 = after anticollision
  logic [7:0]  fifo [$];
  reg_op_t     log_ops [$];
  int          t_reset_wr, t_first_after;

  function automatic logic [7:0] bcc_of(input logic [31:0] u);
    return u[31:24] ^ u[23:16] ^ u[15:8] ^ u[7:0];
  endfunction

  int cyc = 0;
  always @(posedge clk) cyc++;

  initial forever begin
    @(posedge clk);
    if (reg_req) begin
      reg_reply();
    end
  end

  task automatic reg_reply();
    reg_op_t o;
    logic [7:0] r;
    o = reg_op;
    log_ops.push_back(o);
    if (o == '{1'b0, CommandReg, PCD_SOFTRESET}) t_reset_wr = cyc;
    if (o == '{1'b1, TxControlReg, 8'h00}) t_first_after = cyc;
    r = 8'h00;
    if (o.rd) begin
      case (o.addr)
        TxControlReg: r = 8'h80;
        CommIrqReg: begin
          polls++;
          if (card_present && polls > polls_to_answer) r = err_irq ? 8'h02 : 8'h30;
        end
        FIFOLevelReg: r = 8'(fifo.size() + wrong_level);
        FIFODataReg: if (fifo.size() > 0) r = fifo.pop_front();
        default: r = 8'h00;
      endcase
    end else begin
      if (o.addr == FIFODataReg && o.wdata == PICC_REQA) begin
        phase = 1; polls = 0; fifo.delete();
        fifo.push_back(8'h04); fifo.push_back(8'h00);
      end
      if (o.addr == FIFODataReg && o.wdata == ANTICOLL_2) begin
        phase = 2; polls = 0; fifo.delete();
        fifo.push_back(card_uid[31:24]); fifo.push_back(card_uid[23:16]);
        fifo.push_back(card_uid[15:8]);  fifo.push_back(card_uid[7:0]);
        fifo.push_back(bcc_of(card_uid) ^ {8{bad_bcc}});
      end
    end
    repeat ($urandom_range(0, 4)) @(posedge clk);
    reg_rdata <= r;
    reg_done  <= 1'b1;
    @(posedge clk);
    reg_done  <= 1'b0;
  endtask

  // DONE (10) and ERROR (11) are one-clock states
  int seen_done = 0, seen_error = 0;
  always @(posedge clk) begin
    if (state == 4'd10) seen_done++;
    if (state == 4'd11) seen_error++;
  end

  int n_uid_valid = 0, n_decide = 0;
  logic last_granted;
  always @(posedge clk) begin
    if (uid_valid) n_uid_valid++;
    if (decide) begin
      n_decide++;
      last_granted = granted;
    end
  end

  // expected access sequence of a full read with `np` unanswered polls per
  // command
  function automatic void expected_read(ref reg_op_t e [$], input int np);
    e.push_back('{1'b0, 6'h01, 8'h00}); e.push_back('{1'b0, 6'h04, 8'h7F});
    e.push_back('{1'b0, 6'h0A, 8'h80}); e.push_back('{1'b0, 6'h09, 8'h26});
    e.push_back('{1'b0, 6'h01, 8'h0C}); e.push_back('{1'b0, 6'h0D, 8'h87});
    for (int i = 0; i <= np; i++) e.push_back('{1'b1, 6'h04, 8'h00});
    e.push_back('{1'b1, 6'h0A, 8'h00});
    e.push_back('{1'b1, 6'h09, 8'h00}); e.push_back('{1'b1, 6'h09, 8'h00});
    e.push_back('{1'b0, 6'h01, 8'h00}); e.push_back('{1'b0, 6'h04, 8'h7F});
    e.push_back('{1'b0, 6'h0A, 8'h80}); e.push_back('{1'b0, 6'h09, 8'h93});
    e.push_back('{1'b0, 6'h09, 8'h20}); e.push_back('{1'b0, 6'h01, 8'h0C});
    e.push_back('{1'b0, 6'h0D, 8'h80});
    for (int i = 0; i <= np; i++) e.push_back('{1'b1, 6'h04, 8'h00});
    e.push_back('{1'b1, 6'h0A, 8'h00});
    for (int i = 0; i < 5; i++) e.push_back('{1'b1, 6'h09, 8'h00});
  endfunction

  function automatic void expected_init(ref reg_op_t e [$]);
    e.push_back('{1'b0, 6'h01, 8'h0F});
    e.push_back('{1'b1, 6'h14, 8'h00});
    e.push_back('{1'b0, 6'h14, 8'h83});
  endfunction

  task automatic compare_log(ref reg_op_t e [$], input string name);
    bit same;
    same = (e.size() == log_ops.size());
    for (int i = 0; same && i < e.size(); i++) same = (e[i] == log_ops[i]);
    check(same, $sformatf("%s: access sequence differs (%0d logged, %0d expected)",
                          name, log_ops.size(), e.size()));
    if (!same)
      for (int i = 0; i < log_ops.size(); i++)
        $display("  %0d: rd=%0b addr=%h data=%h", i, log_ops[i].rd, log_ops[i].addr, log_ops[i].wdata);
  endtask

  task automatic run_scan(input bit present, input logic [31:0] cu, input int np,
                          input bit bbcc, input int wl, input bit eirq,
                          input bit exp_valid, input bit exp_grant, input string name,
                          input bit cmp_seq);
    reg_op_t e [$];
    int v0, d0;
    logic [31:0] uid0;
    card_present = present; card_uid = cu; polls_to_answer = np;
    bad_bcc = bbcc; wrong_level = wl; err_irq = eirq;
    wait (state == S_WAIT_START);
    @(posedge clk);
    check(!busy, {name, ": not busy in WAIT_START"});
    log_ops.delete();
    v0 = n_uid_valid; d0 = n_decide; uid0 = uid;
    scan_start <= 1'b1;
    @(posedge clk);
    scan_start <= 1'b0;
    wait (decide);
    check(state == S_RESET, {name, ": back in RESET after decision"});
    @(posedge clk);
    @(negedge clk);
    check(n_decide == d0 + 1, {name, ": one decision"});
    check(last_granted == exp_grant, $sformatf("%s: granted=%0b", name, last_granted));
    check(n_uid_valid == v0 + (exp_valid ? 1 : 0), {name, ": uid_valid count"});
    check(uid == (exp_valid ? cu : uid0), $sformatf("%s: uid %h", name, uid));
    if (cmp_seq) begin
      expected_read(e, np);
      compare_log(e, name);
    end
    wait (state == S_WAIT_START);
  endtask

  initial begin
    reg_op_t e [$];
    card_present = 1; card_uid = STORED; polls_to_answer = 2;
    bad_bcc = 0; wrong_level = 0; err_irq = 0; polls = 0; phase = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check(state == S_RESET && state == 4'd0, "RESET is state 0");
    check(busy, "busy during initialisation");
    wait (state == S_ANTENNA_ON);
    check(state == 4'd1, "ANTENNA_ON is state 1");
    wait (state == S_WAIT_START);
    check(state == 4'd2, "WAIT_START is state 2");
    expected_init(e);
    compare_log(e, "initialisation");
    check(t_first_after - t_reset_wr >= RW, "reset wait lasts RESET_WAIT_CYCLES");
    repeat (20) @(posedge clk);
    check(state == S_WAIT_START, "stays in WAIT_START without scan_start");

    run_scan(1, STORED,        2, 0, 0, 0, 1, 1, "authorised card", 1);
    run_scan(1, 32'h0102_0304, 0, 0, 0, 0, 1, 0, "foreign card", 1);
    run_scan(1, STORED,        3, 0, 0, 0, 1, 1, "authorised card again", 1);
    run_scan(0, STORED,        0, 0, 0, 0, 0, 0, "no card", 0);
    check(log_ops.size() == 6 + PL + 3, $sformatf("no card: %0d accesses", log_ops.size()));
    run_scan(1, 32'hCAFE_F00D, 1, 1, 0, 0, 0, 0, "bad BCC", 0);
    run_scan(1, STORED,        1, 0, 1, 0, 0, 0, "wrong FIFO level", 0);
    run_scan(1, STORED,        1, 0, 0, 1, 0, 0, "ErrIRq", 0);
    check(seen_done == 3 && seen_error == 4,
          $sformatf("DONE (10) seen %0d times, ERROR (11) %0d times", seen_done, seen_error));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
