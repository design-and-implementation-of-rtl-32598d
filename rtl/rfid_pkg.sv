// rfid_pkg: constants and types shared by the RFID access controller.
//
// Holds the MFRC522 register addresses and command codes the controller
// uses, the state encoding of the controller FSM and the record that
// describes one register access.  The register addresses CommandReg (0x01),
// CommIrqReg (0x04), FIFODataReg (0x09) and TxControlReg (0x14), the command
// codes PCD_SOFTRESET (0x0F) and PCD_TRANSCEIVE (0x0C), the card commands
// PICC_REQA (0x26), ANTICOLL_1 (0x93) and ANTICOLL_2 (0x20), and the state
// numbers RESET=0, ANTENNA_ON=1, WAIT_START=2, DONE=10 and ERROR=11 follow
// the design description.  FIFOLevelReg, BitFramingReg, PCD_IDLE, the
// interrupt bit positions and the numbers of the remaining states are taken
// from the MFRC522 data sheet or chosen here.
package rfid_pkg;

  // MFRC522 register addresses (6 bit)
  localparam logic [5:0] CommandReg    = 6'h01;
  localparam logic [5:0] CommIrqReg    = 6'h04;
  localparam logic [5:0] FIFODataReg   = 6'h09;
  localparam logic [5:0] FIFOLevelReg  = 6'h0A;
  localparam logic [5:0] BitFramingReg = 6'h0D;
  localparam logic [5:0] TxControlReg  = 6'h14;

  // MFRC522 commands (written to CommandReg)
  localparam logic [7:0] PCD_IDLE       = 8'h00;
  localparam logic [7:0] PCD_TRANSCEIVE = 8'h0C;
  localparam logic [7:0] PCD_SOFTRESET  = 8'h0F;

  // ISO 14443A card commands (written to the FIFO)
  localparam logic [7:0] PICC_REQA  = 8'h26;
  localparam logic [7:0] ANTICOLL_1 = 8'h93;  // SEL, cascade level 1
  localparam logic [7:0] ANTICOLL_2 = 8'h20;  // NVB: no UID bits known yet

  // CommIrqReg bits
  localparam int IRQ_RX  = 5;
  localparam int IRQ_ERR = 1;

  // Controller FSM states
  typedef enum logic [3:0] {
    S_RESET             = 4'd0,
    S_ANTENNA_ON        = 4'd1,
    S_WAIT_START        = 4'd2,
    S_REQA              = 4'd3,
    S_WAIT_IRQ_REQA     = 4'd4,
    S_READ_ATQA         = 4'd5,
    S_ANTICOLL          = 4'd6,
    S_WAIT_IRQ_ANTICOLL = 4'd7,
    S_READ_UID          = 4'd8,
    S_COMPARE           = 4'd9,
    S_DONE              = 4'd10,
    S_ERROR             = 4'd11
  } state_t;

  // One register access: read (rd=1) or write of wdata to addr
  typedef struct packed {
    logic       rd;
    logic [5:0] addr;
    logic [7:0] wdata;
  } reg_op_t;

  // First byte of an MFRC522 SPI access: bit 7 = read, bits 6:1 = address,
  // bit 0 = 0
  function automatic logic [7:0] addr_byte(input logic rd, input logic [5:0] addr);
    return {rd, addr, 1'b0};
  endfunction

endpackage
