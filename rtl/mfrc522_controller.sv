// mfrc522_controller: RFID access-control core for an MFRC522 reader.
//
// On scan_start the controller asks the reader for a card (REQA), runs the
// anticollision command to get the card's 4-byte UID, compares it with the
// stored UID and lights the LED when they match.  Then it soft-resets the
// reader, switches the antenna on again and waits for the next scan_start;
// holding scan_start high scans continuously.
//
// Inside: rfid_fsm sequences the reader's registers, spi_reg_access frames
// each register access as two SPI bytes, spi_master shifts them out in SPI
// mode 0 at ~3 MHz from the 100 MHz clock, uid_comparator checks the UID and
// led_output holds the result.
//
// Ports: the four SPI lines to the reader (sclk, mosi, miso, cs_n); busy is
// low while the controller waits for scan_start; uid and a one-clock
// uid_valid pulse report each card that was read correctly; led shows the
// latest decision.  The port names and the split into SPI controller, FSM,
// comparator and output unit follow the design description.
module mfrc522_controller
  import rfid_pkg::*;
#(
  parameter int unsigned CLK_FREQ_HZ       = 100_000_000,
  parameter int unsigned SCLK_FREQ_HZ      = 3_000_000,
  parameter logic [31:0] STORED_UID        = 32'hDEAD_BEEF,
  parameter int unsigned RESET_WAIT_CYCLES = 5000,
  parameter int unsigned IRQ_POLL_LIMIT    = 200
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        scan_start,
  input  logic        miso,
  output logic        mosi,
  output logic        sclk,
  output logic        cs_n,
  output logic        busy,
  output logic        led,
  output logic [31:0] uid,
  output logic        uid_valid
);

  logic       reg_req, reg_done;
  reg_op_t    reg_op;
  logic [7:0] reg_rdata;
  logic       spi_start, spi_last, spi_ready, spi_done;
  logic [7:0] spi_tx, spi_rx;
  logic       uid_match, decide, granted;

  rfid_fsm #(
    .RESET_WAIT_CYCLES(RESET_WAIT_CYCLES),
    .IRQ_POLL_LIMIT   (IRQ_POLL_LIMIT)
  ) u_fsm (
    .clk, .rst_n, .scan_start,
    .reg_req, .reg_op, .reg_done, .reg_rdata,
    .uid_match, .uid, .uid_valid, .decide, .granted, .busy, .state()
  );

  spi_reg_access u_regif (
    .clk, .rst_n,
    .req(reg_req), .op(reg_op), .busy(), .done(reg_done), .rdata(reg_rdata),
    .spi_start, .spi_tx, .spi_last, .spi_ready, .spi_done, .spi_rx
  );

  spi_master #(
    .CLK_FREQ_HZ (CLK_FREQ_HZ),
    .SCLK_FREQ_HZ(SCLK_FREQ_HZ)
  ) u_spi (
    .clk, .rst_n,
    .start(spi_start), .tx_byte(spi_tx), .last(spi_last),
    .ready(spi_ready), .done(spi_done), .rx_byte(spi_rx),
    .sclk, .mosi, .miso, .cs_n
  );

  uid_comparator #(.STORED_UID(STORED_UID)) u_cmp (
    .uid, .match(uid_match)
  );

  led_output u_led (
    .clk, .rst_n, .decide, .granted, .led
  );

endmodule
