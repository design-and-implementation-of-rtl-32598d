// spi_reg_access: turns one MFRC522 register read or write into the two-byte
// SPI frame the chip expects.
//
// A request (req with rd, addr, wdata) runs the sequence: chip select low,
// send the address byte, send or receive the data byte, chip select high.
// The address byte is {rd, addr[5:0], 1'b0} (MFRC522 data sheet: bit 7 set
// for a read, bit 0 always zero); on a write the second byte carries wdata, on
// a read the master sends 0x00 and the byte shifted in is returned on rdata.
// It drives the byte-level handshake of spi_master (spi_start/spi_tx/
// spi_last, spi_ready, spi_done, spi_rx): the address byte goes out with
// last=0 so chip select stays low, the data byte with last=1.
//
// Timing: req is taken while busy is low; done pulses once the frame has
// ended and chip select is high again, so a new request can follow at once.
// The four-step sequence follows the design description; the address byte
// layout comes from the MFRC522 data sheet; the handshake is this design's.
module spi_reg_access
  import rfid_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // register access request
  input  logic       req,
  input  reg_op_t    op,
  output logic       busy,
  output logic       done,
  output logic [7:0] rdata,
  // byte interface of spi_master
  output logic       spi_start,
  output logic [7:0] spi_tx,
  output logic       spi_last,
  input  logic       spi_ready,
  input  logic       spi_done,
  input  logic [7:0] spi_rx
);

  typedef enum logic [2:0] {IDLE, ADDR, ADDR_WAIT, DATA, DATA_WAIT, FINISH} st_t;

  st_t     st;
  reg_op_t op_q;

  assign busy = (st != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= IDLE;
      op_q      <= '0;
      rdata     <= '0;
      done      <= 1'b0;
      spi_start <= 1'b0;
      spi_tx    <= '0;
      spi_last  <= 1'b0;
    end else begin
      done      <= 1'b0;
      spi_start <= 1'b0;
      unique case (st)
        IDLE: if (req) begin
          op_q <= op;
          st   <= ADDR;
        end
        ADDR: if (spi_ready) begin                  // CS low, address byte
          spi_start <= 1'b1;
          spi_tx    <= addr_byte(op_q.rd, op_q.addr);
          spi_last  <= 1'b0;
          st        <= ADDR_WAIT;
        end
        ADDR_WAIT: if (spi_done) st <= DATA;
        DATA: if (spi_ready) begin                  // data byte, then CS high
          spi_start <= 1'b1;
          spi_tx    <= op_q.rd ? 8'h00 : op_q.wdata;
          spi_last  <= 1'b1;
          st        <= DATA_WAIT;
        end
        DATA_WAIT: if (spi_done) begin
          if (op_q.rd) rdata <= spi_rx;
          st <= FINISH;
        end
        FINISH: if (spi_ready && !spi_start) begin  // chip select released
          done <= 1'b1;
          st   <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) req |-> !busy)
    else $error("spi_reg_access: request while busy");

endmodule
