// spi_master: SPI mode 0 (CPOL=0, CPHA=0) master that moves one byte per
// request, MSB first, with a built-in clock divider.
//
// SCLK is derived from the system clock by counting HALF = ceil(CLK_FREQ_HZ /
// (2*SCLK_FREQ_HZ)) clock cycles per SCLK phase: 100 MHz and ~3 MHz give 17,
// i.e. an SCLK of 2.94 MHz (34 clocks per SCLK period).  SCLK idles low.  MOSI
// carries bit 7 of the byte before the first rising edge and moves to the next
// bit on each falling edge; MISO is sampled at each rising edge.  Eight SCLK
// cycles make one byte.
//
// Several bytes can share one chip-select frame: cs_n falls with the first
// start and stays low after a byte whose `last` input was 0, waiting for the
// next start (ready is high in that gap).  After a byte with last=1 the master
// waits one half period (CS hold), raises cs_n and keeps it high for one more
// half period before ready returns.  One half period also separates the fall
// of cs_n from the first rising SCLK edge (CS setup).
//
// Interface: start is taken only while ready is high; done pulses for one
// clock when a byte is complete, with rx_byte valid from then on.
//
// Mode 0, 8-bit data, ~3 MHz SCLK from a 100 MHz clock, the clock divider and
// the shift register follow the design description; the multi-byte chip-select
// framing and the setup/hold half periods are this design's choice.
module spi_master #(
  parameter int unsigned CLK_FREQ_HZ  = 100_000_000,
  parameter int unsigned SCLK_FREQ_HZ = 3_000_000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] tx_byte,
  input  logic       last,
  output logic       ready,
  output logic       done,
  output logic [7:0] rx_byte,
  output logic       sclk,
  output logic       mosi,
  input  logic       miso,
  output logic       cs_n
);

  localparam int unsigned HALF = (CLK_FREQ_HZ + 2 * SCLK_FREQ_HZ - 1) / (2 * SCLK_FREQ_HZ);
  localparam int unsigned CW   = (HALF > 1) ? $clog2(HALF) : 1;

  typedef enum logic [2:0] {IDLE, LEAD, HIGH, LOW, GAP, TRAIL, CSOFF} st_t;

  st_t           st;
  logic [CW-1:0] cnt;
  logic [2:0]    bitcnt;
  logic [7:0]    txsh, rxsh;
  logic          last_q;
  logic          tick;

  assign tick  = (cnt == CW'(HALF - 1));
  assign mosi  = txsh[7];
  assign ready = (st == IDLE) || (st == GAP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= IDLE;
      cnt     <= '0;
      bitcnt  <= '0;
      txsh    <= '0;
      rxsh    <= '0;
      rx_byte <= '0;
      last_q  <= 1'b0;
      sclk    <= 1'b0;
      cs_n    <= 1'b1;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      cnt  <= (st == IDLE || st == GAP || tick) ? '0 : cnt + 1'b1;
      unique case (st)
        IDLE, GAP: if (start) begin
          txsh   <= tx_byte;
          last_q <= last;
          bitcnt <= '0;
          cs_n   <= 1'b0;
          st     <= (st == IDLE) ? LEAD : LOW;
        end
        LEAD, LOW: if (tick) begin
          sclk <= 1'b1;                      // rising edge: sample MISO
          rxsh <= {rxsh[6:0], miso};
          st   <= HIGH;
        end
        HIGH: if (tick) begin
          sclk <= 1'b0;                      // falling edge: next MOSI bit
          if (bitcnt == 3'd7) begin
            rx_byte <= rxsh;
            done    <= 1'b1;
            st      <= last_q ? TRAIL : GAP;
          end else begin
            txsh   <= {txsh[6:0], 1'b0};
            bitcnt <= bitcnt + 1'b1;
            st     <= LOW;
          end
        end
        TRAIL: if (tick) begin
          cs_n <= 1'b1;
          st   <= CSOFF;
        end
        CSOFF: if (tick) st <= IDLE;
        default: st <= IDLE;
      endcase
    end
  end

  // A start outside the ready window would be lost.
  assert property (@(posedge clk) disable iff (!rst_n) start |-> ready)
    else $error("spi_master: start while busy");
  // SCLK only toggles while the chip is selected.
  assert property (@(posedge clk) disable iff (!rst_n) sclk |-> !cs_n)
    else $error("spi_master: SCLK high with CS released");

endmodule
