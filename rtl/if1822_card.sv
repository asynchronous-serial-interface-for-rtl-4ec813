// if1822_card: the special I/O card of a BBN 1822 host interface.
//
// Together with a DEC DR11-C (or DRV-11) 16-bit parallel interface, this
// card connects a PDP-11 to an IMP of the ARPANET or the packet radio net.
// The DR11-C provides the three program registers and the interrupts; the
// card turns its output word into the bit-serial, handshaken host-to-IMP
// stream, turns the IMP-to-host stream into its input word, and handles the
// two "ready" relays of the 1822 specification.
//
// Parts, each in its own module:
//   transmitter      OUTBUF byte -> Host Data / LHDB, handshake RFNHB/TYHB,
//                    REQUEST A after 8 bits (CSR0 = transmit enable)
//   host_power_latch OUTBUF bits 12/13 -> host relay, INIT opens it
//   receiver         IMP Data / LIDB -> INBUF, handshake TYIB/RFNIB,
//                    REQUEST B on 8 bits, last bit or IMP power change
//                    (CSR1 = receive enable)
//   imp_power_sense  IMP relay -> INBUF bit 12, change flag INBUF bit 14
//
// DR11-C side: `outbuf` is the DR11-C output register, `load_pulse` its NEW
// DATA READY pulse, `read_pulse` its DATA TRANSMITTED pulse, `init` its INIT
// line, `csr0`/`csr1` its command bits; `inbuf`, `req_a` and `req_b` go to
// its input gate and request inputs. All of these are synchronous to `clk`.
// IMP side: single-ended logic levels of the 1822 lines, before the
// differential drivers and after the differential receivers; the inputs are
// asynchronous and are synchronised inside. `host_relay_closed` drives the
// host relay coil; `imp_relay_open` is the debounced IMP relay level.
//
// INBUF bit 15 is the OR of bits 14 and 11. The block structure, register
// layout and interrupt conditions follow the document; the single clock,
// the synchronisers and the one-shot widths in cycles (10 cycles = 1 us at
// an assumed 10 MHz clock) are this design's.
module if1822_card
  import if1822_pkg::*;
#(
  parameter int unsigned T1_CYCLES    = T_1US_CYCLES,
  parameter int unsigned T2_CYCLES    = T_1US_CYCLES,
  parameter int unsigned T3_CYCLES    = T_1US_CYCLES,
  parameter int unsigned T4_CYCLES    = T_1US_CYCLES,
  parameter int unsigned PWR_PULSE_CYCLES = 3
) (
  input  logic    clk,
  input  logic    rst_n,
  // DR11-C side
  input  logic    init,
  input  outbuf_t outbuf,
  input  logic    load_pulse,
  input  logic    read_pulse,
  input  logic    csr0,
  input  logic    csr1,
  output inbuf_t  inbuf,
  output logic    req_a,
  output logic    req_b,
  // IMP side
  output logic    tyhb,
  output logic    host_data,
  output logic    lhdb,
  input  logic    rfnhb,
  input  logic    tyib,
  input  logic    imp_data,
  input  logic    lidb,
  output logic    rfnib,
  output logic    host_relay_closed,
  input  logic    imp_relay_open
);
  logic       clear;
  logic       pwr_ff;
  logic       imp_pwr_off;
  logic       host_pwr_off;
  logic       change_pulse;
  logic [7:0] rx_data;
  logic [2:0] rx_count;
  logic       rx_last;
  logic       rx_strobe;
  logic       xmt_holdoff;
  logic       xmt_advance;
  logic [3:0] xmt_count;

  transmitter #(.T4_CYCLES(T4_CYCLES)) u_xmt (
    .clk        (clk),
    .rst_n      (rst_n),
    .init       (init),
    .load_pulse (load_pulse),
    .xmt_enable (csr0),
    .outbuf     (outbuf),
    .rfnhb_in   (rfnhb),
    .tyhb       (tyhb),
    .host_data  (host_data),
    .lhdb       (lhdb),
    .int_req_a  (req_a),
    .holdoff    (xmt_holdoff),
    .advance    (xmt_advance),
    .bit_count  (xmt_count)
  );

  host_power_latch u_hpl (
    .clk          (clk),
    .rst_n        (rst_n),
    .init         (init),
    .set_closed   (outbuf.host_pwr_set),
    .clear_open   (outbuf.host_pwr_clear),
    .relay_closed (host_relay_closed),
    .host_pwr_off (host_pwr_off)
  );

  receiver #(
    .T1_CYCLES(T1_CYCLES), .T2_CYCLES(T2_CYCLES), .T3_CYCLES(T3_CYCLES)
  ) u_rcv (
    .clk        (clk),
    .rst_n      (rst_n),
    .init       (init),
    .read_pulse (read_pulse),
    .rcv_enable (csr1),
    .tyib_in    (tyib),
    .data_in    (imp_data),
    .lidb_in    (lidb),
    .pwr_ff     (pwr_ff),
    .rfnib      (rfnib),
    .clear      (clear),
    .int_req_b  (req_b),
    .data       (rx_data),
    .bit_count  (rx_count),
    .last_byte  (rx_last),
    .strobe     (rx_strobe)
  );

  imp_power_sense #(.PULSE_CYCLES(PWR_PULSE_CYCLES)) u_pwr (
    .clk            (clk),
    .rst_n          (rst_n),
    .imp_relay_open (imp_relay_open),
    .clear          (clear),
    .imp_pwr_off    (imp_pwr_off),
    .change_pulse   (change_pulse),
    .pwr_ff         (pwr_ff)
  );

  always_comb begin
    inbuf.data         = rx_data;
    inbuf.bit_count    = rx_count;
    inbuf.last_byte    = rx_last;
    inbuf.imp_pwr_off  = imp_pwr_off;
    inbuf.host_pwr_off = host_pwr_off;
    inbuf.imp_was_down = pwr_ff;
    inbuf.special      = pwr_ff || rx_last;
  end
endmodule
