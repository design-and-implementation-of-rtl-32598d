// tb_spi_reg_access: self-checking test of the MFRC522 register framing.
//
// The testbench stands in for spi_master at its byte handshake: it is ready
// when idle, takes each spi_start, answers with spi_done a few clocks later
// (random delay) and returns a chosen byte on spi_rx; after a byte sent with
// last=1 it stays not-ready for a while, as the real master does while chip
// select is released.  It records every byte and its last flag.  Random reads
// and writes are checked for: exactly two bytes per access, the address byte
// {rd, addr, 0}, last=0 then last=1, the write data or 0x00 as second byte,
// the read data returned on rdata, one done pulse per access and no done
// before the frame has ended.
module tb_spi_reg_access;
  import rfid_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       req = 1'b0;
  reg_op_t    op = '0;
  logic       busy, done;
  logic [7:0] rdata;
  logic       spi_start, spi_last;
  logic [7:0] spi_tx;
  logic       spi_ready = 1'b1, spi_done = 1'b0;
  logic [7:0] spi_rx = '0;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  spi_reg_access dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // byte-level master stand-in
  logic [7:0] bytes [$];
  logic       lasts [$];
  logic [7:0] reply;
  bit         frame_open = 0;
  initial forever begin
    @(posedge clk);
    if (spi_start) begin
      check(spi_ready, "start while master busy");
      bytes.push_back(spi_tx);
      lasts.push_back(spi_last);
      spi_ready <= 1'b0;
      frame_open = !spi_last;
      repeat ($urandom_range(2, 9)) @(posedge clk);
      spi_rx   <= reply;
      spi_done <= 1'b1;
      @(posedge clk);
      spi_done <= 1'b0;
      if (lasts[$]) repeat ($urandom_range(3, 12)) @(posedge clk);
      spi_ready <= 1'b1;
    end
  end

  int dones = 0;
  always @(posedge clk) if (done) dones++;

  initial begin
    reg_op_t o;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check(!busy && !done, "idle after reset");
    for (int k = 0; k < 40; k++) begin
      o.rd    = 1'($urandom);
      o.addr  = 6'($urandom);
      o.wdata = 8'($urandom);
      reply   = 8'($urandom);
      bytes.delete();
      lasts.delete();
      dones = 0;
      @(posedge clk);
      req <= 1'b1;
      op  <= o;
      @(posedge clk);
      req <= 1'b0;
      op  <= '0;
      while (!done) @(posedge clk);
      check(spi_ready, "done only after the frame ended");
      @(posedge clk);
      check(!busy, "idle after done");
      check(bytes.size() == 2, $sformatf("%0d bytes in access", bytes.size()));
      if (bytes.size() == 2) begin
        check(bytes[0] == {o.rd, o.addr, 1'b0},
              $sformatf("address byte %h for rd=%0b addr=%h", bytes[0], o.rd, o.addr));
        check(bytes[1] == (o.rd ? 8'h00 : o.wdata), $sformatf("data byte %h", bytes[1]));
        check(!lasts[0] && lasts[1], "last flags 0 then 1");
      end
      if (o.rd) check(rdata == reply, $sformatf("rdata %h expected %h", rdata, reply));
      repeat (4) @(posedge clk);
      check(dones == 1, $sformatf("%0d done pulses", dones));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
