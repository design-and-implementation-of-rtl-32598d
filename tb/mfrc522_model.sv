// mfrc522_model: behavioural model of an MFRC522 reader with one ISO 14443A
// card in front of it, seen through its SPI slave port.  Simulation only.
//
// SPI: mode 0, MSB first, two-byte frames.  The first byte is {read, addr[5:0],
// 0}; on a read the register value is shifted out on MISO during the second
// byte, on a write the second byte is stored when chip select rises.  A frame
// that is not exactly two bytes, or an address byte with bit 0 set, is counted
// in proto_errors.
//
// Registers modelled: CommandReg (SoftReset restores the reset values and
// counts in soft_resets), CommIrqReg (write-1-to-clear, bit 7 = set),
// FIFODataReg (64-byte FIFO), FIFOLevelReg (bit 7 flushes), BitFramingReg and
// TxControlReg.  Writing BitFramingReg with StartSend while the Transceive
// command is active sends the FIFO contents to the card: if the antenna is on
// (TxControlReg[1:0]=3) and card_present is high, the model answers after
// RESP_DELAY time units: a 7-bit REQA (0x26) returns ATQA 0x04 0x00, the
// anticollision command 0x93 0x20 returns the UID bytes and their BCC (bad_bcc
// inverts the BCC).  The answer lands in the FIFO and sets RxIRq and IdleIRq.
// Without a card nothing happens.
module mfrc522_model #(
  parameter int unsigned RESP_DELAY = 20000
) (
  input  logic        sclk,
  input  logic        mosi,
  input  logic        cs_n,
  output logic        miso,
  input  logic        card_present,
  input  logic [31:0] card_uid,
  input  logic        bad_bcc,
  output int          proto_errors,
  output int          soft_resets,
  output int          reqa_seen,
  output int          anticoll_seen,
  output int          irq_reads
);

  logic [7:0] command, comm_irq, bit_framing, tx_control;
  logic [7:0] fifo [64];
  int         fifo_cnt;
  logic       reply_pending;

  function automatic void do_reset();
    command     = 8'h20;
    comm_irq    = 8'h14;
    bit_framing = 8'h00;
    tx_control  = 8'h80;
    fifo_cnt    = 0;
  endfunction

  function automatic logic [7:0] read_reg(input logic [5:0] a);
    logic [7:0] v;
    v = 8'h00;
    case (a)
      6'h01: v = command;
      6'h04: begin v = comm_irq; irq_reads++; end
      6'h09: if (fifo_cnt > 0) begin
        v = fifo[0];
        for (int i = 0; i < 63; i++) fifo[i] = fifo[i+1];
        fifo_cnt--;
      end
      6'h0A: v = 8'(fifo_cnt);
      6'h0D: v = bit_framing;
      6'h14: v = tx_control;
      default: v = 8'h00;
    endcase
    return v;
  endfunction

  task automatic card_reply(input logic [7:0] b [5], input int n);
    #(RESP_DELAY);
    for (int i = 0; i < n; i++) begin
      fifo[fifo_cnt] = b[i];
      fifo_cnt++;
    end
    comm_irq      = comm_irq | 8'h30;   // RxIRq, IdleIRq
    command       = 8'h00;
    reply_pending = 1'b0;
  endtask

  task automatic transceive();
    logic [7:0] r [5];
    logic       antenna;
    antenna = (tx_control[1:0] == 2'b11);
    r = '{default: 8'h00};
    if (fifo_cnt == 1 && fifo[0] == 8'h26 && bit_framing[2:0] == 3'd7) begin
      reqa_seen++;
      fifo_cnt = 0;
      if (antenna && card_present) begin
        r[0] = 8'h04; r[1] = 8'h00;
        reply_pending = 1'b1;
        fork card_reply(r, 2); join_none
      end
    end else if (fifo_cnt == 2 && fifo[0] == 8'h93 && fifo[1] == 8'h20
                 && bit_framing[2:0] == 3'd0) begin
      anticoll_seen++;
      fifo_cnt = 0;
      if (antenna && card_present) begin
        r[0] = card_uid[31:24]; r[1] = card_uid[23:16];
        r[2] = card_uid[15:8];  r[3] = card_uid[7:0];
        r[4] = r[0] ^ r[1] ^ r[2] ^ r[3] ^ {8{bad_bcc}};
        reply_pending = 1'b1;
        fork card_reply(r, 5); join_none
      end
    end else begin
      fifo_cnt = 0;
    end
  endtask

  function automatic void write_reg(input logic [5:0] a, input logic [7:0] d);
    case (a)
      6'h01: begin
        command = d;
        if (d[3:0] == 4'hF) begin
          soft_resets++;
          do_reset();
        end
      end
      6'h04: if (d[7]) comm_irq = comm_irq | {1'b0, d[6:0]};
             else      comm_irq = comm_irq & ~{1'b0, d[6:0]};
      6'h09: if (fifo_cnt < 64) begin
        fifo[fifo_cnt] = d;
        fifo_cnt++;
      end
      6'h0A: if (d[7]) fifo_cnt = 0;
      6'h0D: bit_framing = d;
      6'h14: tx_control = d;
      default: ;
    endcase
  endfunction

  initial begin
    proto_errors  = 0;
    soft_resets   = 0;
    reqa_seen     = 0;
    anticoll_seen = 0;
    irq_reads     = 0;
    reply_pending = 1'b0;
    miso          = 1'b0;
    do_reset();
  end

  // SPI slave, one frame per chip-select low period
  initial begin
    logic [7:0] a, d, q;
    forever begin
      @(negedge cs_n);
      miso = 1'b0;
      a = '0;
      for (int i = 0; i < 8; i++) begin
        @(posedge sclk);
        a = {a[6:0], mosi};
      end
      if (a[0]) proto_errors++;
      q = a[7] ? read_reg(a[6:1]) : 8'h00;
      d = '0;
      for (int i = 7; i >= 0; i--) begin
        @(negedge sclk or posedge cs_n);
        if (cs_n) break;
        miso = q[i];
        @(posedge sclk);
        d = {d[6:0], mosi};
      end
      if (!cs_n) begin
        @(posedge sclk or posedge cs_n);
        if (!cs_n) begin
          proto_errors++;             // more than two bytes in one frame
          @(posedge cs_n);
        end
      end
      miso = 1'b0;
      if (!a[7]) begin
        write_reg(a[6:1], d);
        if (a[6:1] == 6'h0D && d[7] && command[3:0] == 4'hC && !reply_pending)
          transceive();
      end
    end
  end

endmodule
