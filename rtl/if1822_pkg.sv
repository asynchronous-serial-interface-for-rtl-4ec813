// if1822_pkg: register layouts and shared constants of the BBN 1822 host
// interface card.
//
// The card sits between a DR11-C / DRV-11 16-bit parallel interface and an
// IMP. The program sees three DR11-C registers: DRCSR (enables and request
// flags), OUTBUF (what the card transmits) and INBUF (what the card has
// received). The packed structs below give the bit assignment of OUTBUF and
// INBUF exactly as the card uses them; the DRCSR bit numbers are the DR11-C's.
//
// Timing constants are counted in cycles of the single clock the whole
// synchronous design runs on. The original card used 74123 one-shots all set
// to 1 us; with the 10 MHz clock assumed here that is 10 cycles.
package if1822_pkg;

  // Transmit register OUTBUF (DR11-C output buffer, driven to the card).
  typedef struct packed {
    logic [1:0] unused_15_14;
    logic       host_pwr_clear;  // bit 13: open the host power relay
    logic       host_pwr_set;    // bit 12: close the host power relay
    logic       last_byte;       // bit 11: assert LHDB with bit 0 of this byte
    logic [2:0] unused_10_8;
    logic [7:0] data;            // bit 7 is sent first
  } outbuf_t;

  // Receive register INBUF (card outputs, read through the DR11-C input gate).
  typedef struct packed {
    logic       special;         // bit 15: last_byte | imp_was_down
    logic       imp_was_down;    // bit 14: IMP relay changed state since last clear
    logic       host_pwr_off;    // bit 13: host relay contacts open
    logic       imp_pwr_off;     // bit 12: IMP relay reports power off
    logic       last_byte;       // bit 11: LIDB seen with the last bit received
    logic [2:0] bit_count;       // bits 10:8: bits shifted in, modulo 8
    logic [7:0] data;            // bit 7 = first bit received
  } inbuf_t;

  // DRCSR bit numbers (DR11-C control and status register).
  localparam int unsigned CSR_XMT_ENABLE = 0;   // CSR0
  localparam int unsigned CSR_RCV_ENABLE = 1;   // CSR1
  localparam int unsigned CSR_RCV_IE     = 5;   // INT ENB B
  localparam int unsigned CSR_XMT_IE     = 6;   // INT ENB A
  localparam int unsigned CSR_XMT_REQ    = 7;   // REQUEST A
  localparam int unsigned CSR_RCV_REQ    = 15;  // REQUEST B

  // Default one-shot widths in clock cycles (1 us at an assumed 10 MHz clock).
  localparam int unsigned T_1US_CYCLES = 10;

endpackage
