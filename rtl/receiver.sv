// receiver: data section of the card's receive side.
//
// Takes bits from the IMP with the 1822 IMP-bit handshake (TYIB from the
// IMP, RFNIB to the IMP) and assembles them, first bit in bit 7, into the low
// byte of INBUF, with the bit count in bits 10:8 and the Last Data Bit flag
// in bit 11. It stops after 8 bits or after a bit that came with LIDB, and
// requests a receive interrupt (REQUEST B, DRCSR bit 15) until the program
// reads INBUF; the read pulse, through the 1 us T3 one-shot, or INIT clears
// it for the next byte. The IMP power flag from imp_power_sense enters the
// same interrupt request, and the clear line is given back to it.
//
// It joins rcv_control and rcv_deserializer and synchronises the three
// asynchronous lines TYIB, IMP data and LIDB with two flip-flops each. The
// data and LIDB are sampled T1 after TYIB is seen, so they may lag TYIB by
// up to T1 minus the synchroniser skew. The DR11-C signals are taken as
// synchronous to `clk`.
module receiver #(
  parameter int unsigned T1_CYCLES = if1822_pkg::T_1US_CYCLES,
  parameter int unsigned T2_CYCLES = if1822_pkg::T_1US_CYCLES,
  parameter int unsigned T3_CYCLES = if1822_pkg::T_1US_CYCLES
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       init,
  input  logic       read_pulse,
  input  logic       rcv_enable,
  input  logic       tyib_in,     // asynchronous, from the line receivers
  input  logic       data_in,
  input  logic       lidb_in,
  input  logic       pwr_ff,      // from imp_power_sense
  output logic       rfnib,
  output logic       clear,       // clear line, to imp_power_sense
  output logic       int_req_b,
  output logic [7:0] data,        // INBUF bits 7:0
  output logic [2:0] bit_count,   // INBUF bits 10:8
  output logic       last_byte,   // INBUF bit 11
  output logic       strobe
);
  logic tyib, data_s, lidb_s;
  logic full;
  logic [3:0] count;

  sync2 u_sync_tyib (.clk(clk), .rst_n(rst_n), .d(tyib_in), .q(tyib));
  sync2 u_sync_data (.clk(clk), .rst_n(rst_n), .d(data_in), .q(data_s));
  sync2 u_sync_lidb (.clk(clk), .rst_n(rst_n), .d(lidb_in), .q(lidb_s));

  rcv_control #(
    .T1_CYCLES(T1_CYCLES), .T2_CYCLES(T2_CYCLES), .T3_CYCLES(T3_CYCLES)
  ) u_ctl (
    .clk        (clk),
    .rst_n      (rst_n),
    .init       (init),
    .read_pulse (read_pulse),
    .rcv_enable (rcv_enable),
    .tyib       (tyib),
    .full       (full),
    .ldb_ff     (last_byte),
    .pwr_ff     (pwr_ff),
    .rfnib      (rfnib),
    .strobe     (strobe),
    .clear      (clear),
    .int_req_b  (int_req_b)
  );

  rcv_deserializer u_des (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (clear),
    .strobe    (strobe),
    .serial_in (data_s),
    .lidb      (lidb_s),
    .data      (data),
    .count     (count),
    .full      (full),
    .ldb_ff    (last_byte)
  );

  assign bit_count = count[2:0];
endmodule
