// rfid_fsm: controller FSM that drives the MFRC522 through one card read and
// hands the UID to the comparator.
//
// Each state issues a short, fixed script of register accesses through
// spi_reg_access (one access at a time, req/done handshake) and then moves on:
//   RESET       write CommandReg=PCD_SOFTRESET, wait RESET_WAIT_CYCLES
//   ANTENNA_ON  read TxControlReg, write it back with bits 1:0 set
//   WAIT_START  idle until scan_start
//   REQA        CommandReg=Idle, clear CommIrqReg, flush FIFO, FIFO<=0x26,
//               CommandReg=Transceive, BitFramingReg=0x87 (7-bit frame, send)
//   WAIT_IRQ_*  poll CommIrqReg until RxIRq; ErrIRq or IRQ_POLL_LIMIT polls
//               without an answer (no card) lead to ERROR
//   READ_ATQA   FIFOLevelReg must be 2, read both ATQA bytes
//   ANTICOLL    as REQA with FIFO<=0x93,0x20 and BitFramingReg=0x80
//   READ_UID    FIFOLevelReg must be 5, read UID0..UID3 and BCC
//   COMPARE     BCC must equal UID0^UID1^UID2^UID3
//   DONE        uid_valid and decide pulse, granted = uid_match
//   ERROR       decide pulses with granted = 0
// DONE and ERROR return to RESET, so every card read starts from a freshly
// reset reader.  uid is {UID0,UID1,UID2,UID3}, first received byte in bits
// 31:24, and holds its value until the next successful read.  busy is low only
// in WAIT_START.
//
// The state names RESET, ANTENNA_ON, REQA, WAIT_IRQ, READ, DONE, their order
// and the return to the initial state, the extra states WAIT_START and ERROR
// with their numbers (0, 1, 2, 10, 11), the register and command codes and
// the 32-bit UID follow the design description.  The exact register scripts,
// splitting WAIT_IRQ and READ per command, the BCC check, the polling limit
// and the reset wait are this design's choices, made after the MFRC522 data
// sheet.
module rfid_fsm
  import rfid_pkg::*;
#(
  parameter int unsigned RESET_WAIT_CYCLES = 5000,
  parameter int unsigned IRQ_POLL_LIMIT    = 200
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        scan_start,
  // register access port (to spi_reg_access)
  output logic        reg_req,
  output reg_op_t     reg_op,
  input  logic        reg_done,
  input  logic [7:0]  reg_rdata,
  // UID and result
  input  logic        uid_match,
  output logic [31:0] uid,
  output logic        uid_valid,
  output logic        decide,
  output logic        granted,
  output logic        busy,
  output state_t      state
);

  localparam int unsigned WCW = (RESET_WAIT_CYCLES > 1) ? $clog2(RESET_WAIT_CYCLES + 1) : 1;
  localparam int unsigned PCW = (IRQ_POLL_LIMIT > 1) ? $clog2(IRQ_POLL_LIMIT + 1) : 1;

  logic [3:0]     step;
  logic           pending;
  logic [7:0]     txctrl;
  logic [WCW-1:0] wait_cnt;
  logic [PCW-1:0] polls;
  logic [7:0]     uid_b [4];
  logic [7:0]     bcc;
  reg_op_t        cur_op;
  logic [3:0]     script_len;

  function automatic reg_op_t wr(input logic [5:0] a, input logic [7:0] d);
    return '{rd: 1'b0, addr: a, wdata: d};
  endfunction
  function automatic reg_op_t rd(input logic [5:0] a);
    return '{rd: 1'b1, addr: a, wdata: 8'h00};
  endfunction

  // Register script of the current state
  always_comb begin
    cur_op     = rd(CommIrqReg);
    script_len = 4'd0;
    unique case (state)
      S_RESET: begin
        script_len = 4'd1;
        cur_op     = wr(CommandReg, PCD_SOFTRESET);
      end
      S_ANTENNA_ON: begin
        script_len = 4'd2;
        cur_op     = (step == 0) ? rd(TxControlReg) : wr(TxControlReg, txctrl | 8'h03);
      end
      S_REQA, S_ANTICOLL: begin
        script_len = (state == S_REQA) ? 4'd6 : 4'd7;
        unique case (step)
          4'd0: cur_op = wr(CommandReg, PCD_IDLE);
          4'd1: cur_op = wr(CommIrqReg, 8'h7F);         // clear all requests
          4'd2: cur_op = wr(FIFOLevelReg, 8'h80);       // flush FIFO
          4'd3: cur_op = wr(FIFODataReg, (state == S_REQA) ? PICC_REQA : ANTICOLL_1);
          default: begin
            if (state == S_REQA)
              cur_op = (step == 4'd4) ? wr(CommandReg, PCD_TRANSCEIVE)
                                      : wr(BitFramingReg, 8'h87);
            else
              cur_op = (step == 4'd4) ? wr(FIFODataReg, ANTICOLL_2)
                     : (step == 4'd5) ? wr(CommandReg, PCD_TRANSCEIVE)
                                      : wr(BitFramingReg, 8'h80);
          end
        endcase
      end
      S_WAIT_IRQ_REQA, S_WAIT_IRQ_ANTICOLL: begin
        script_len = 4'd1;
        cur_op     = rd(CommIrqReg);
      end
      S_READ_ATQA: begin
        script_len = 4'd3;
        cur_op     = (step == 0) ? rd(FIFOLevelReg) : rd(FIFODataReg);
      end
      S_READ_UID: begin
        script_len = 4'd6;
        cur_op     = (step == 0) ? rd(FIFOLevelReg) : rd(FIFODataReg);
      end
      default: ;
    endcase
  end

  assign reg_op = cur_op;
  assign busy   = (state != S_WAIT_START);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_RESET;
      step      <= '0;
      pending   <= 1'b0;
      reg_req   <= 1'b0;
      txctrl    <= '0;
      wait_cnt  <= '0;
      polls     <= '0;
      uid_b     <= '{default: '0};
      bcc       <= '0;
      uid       <= '0;
      uid_valid <= 1'b0;
      decide    <= 1'b0;
      granted   <= 1'b0;
    end else begin
      reg_req   <= 1'b0;
      uid_valid <= 1'b0;
      decide    <= 1'b0;
      unique case (state)
        S_WAIT_START: if (scan_start) begin
          state <= S_REQA;
          step  <= '0;
        end
        S_COMPARE: state <= (bcc == (uid_b[0] ^ uid_b[1] ^ uid_b[2] ^ uid_b[3])) ? S_DONE : S_ERROR;
        S_DONE: begin
          uid_valid <= 1'b1;
          decide    <= 1'b1;
          granted   <= uid_match;
          state     <= S_RESET;
          step      <= '0;
        end
        S_ERROR: begin
          decide  <= 1'b1;
          granted <= 1'b0;
          state   <= S_RESET;
          step    <= '0;
        end
        default: begin
          if (step == script_len) begin
            // script finished: only RESET still has something to do
            if (wait_cnt == WCW'(RESET_WAIT_CYCLES)) begin
              wait_cnt <= '0;
              state    <= S_ANTENNA_ON;
              step     <= '0;
            end else begin
              wait_cnt <= wait_cnt + 1'b1;
            end
          end else if (!pending) begin
            reg_req <= 1'b1;
            pending <= 1'b1;
          end else if (reg_done) begin
            pending <= 1'b0;
            step    <= step + 1'b1;
            unique case (state)
              S_ANTENNA_ON: begin
                if (step == 0) txctrl <= reg_rdata;
                else begin
                  state <= S_WAIT_START;
                  step  <= '0;
                end
              end
              S_REQA: if (step == 4'd5) begin
                state <= S_WAIT_IRQ_REQA;
                step  <= '0;
                polls <= '0;
              end
              S_ANTICOLL: if (step == 4'd6) begin
                state <= S_WAIT_IRQ_ANTICOLL;
                step  <= '0;
                polls <= '0;
              end
              S_WAIT_IRQ_REQA, S_WAIT_IRQ_ANTICOLL: begin
                step <= '0;
                if (reg_rdata[IRQ_ERR])
                  state <= S_ERROR;
                else if (reg_rdata[IRQ_RX])
                  state <= (state == S_WAIT_IRQ_REQA) ? S_READ_ATQA : S_READ_UID;
                else if (polls == PCW'(IRQ_POLL_LIMIT - 1))
                  state <= S_ERROR;              // no answer: no card
                else
                  polls <= polls + 1'b1;
              end
              S_READ_ATQA: begin
                if (step == 0 && reg_rdata != 8'd2) state <= S_ERROR;
                else if (step == 4'd2) begin
                  state <= S_ANTICOLL;
                  step  <= '0;
                end
              end
              S_READ_UID: begin
                if (step == 0 && reg_rdata != 8'd5) state <= S_ERROR;
                else if (step == 4'd5) begin
                  bcc   <= reg_rdata;
                  state <= S_COMPARE;
                end else if (step != 0) begin
                  uid_b[2'(step - 4'd1)] <= reg_rdata;
                end
              end
              default: ;
            endcase
          end
        end
      endcase
      if (state == S_COMPARE && bcc == (uid_b[0] ^ uid_b[1] ^ uid_b[2] ^ uid_b[3]))
        uid <= {uid_b[0], uid_b[1], uid_b[2], uid_b[3]};
    end
  end

endmodule
