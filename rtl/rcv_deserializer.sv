// rcv_deserializer: serial-to-parallel data path of the receiver.
//
// On each one-cycle `strobe` (the end of the T1 deskew delay in rcv_control)
// the IMP data bit is shifted into bit 0 of an 8-bit register (the card's
// 74164) while earlier bits move toward bit 7, so the first bit of a byte
// ends in bit 7. A 4-bit counter (the 74193) counts the strobes; its low
// three bits are INBUF bits 10:8 and its top bit, `full`, says 8 bits have
// arrived. The Last Data Bit flip-flop (the 7474) samples the LIDB line on
// the same strobe, so it holds 1 only if LIDB was asserted with the bit just
// taken. `clear` (the card's clear line) empties all three at once.
// Outputs are registered and change on the clock edge that samples `strobe`.
// The parts and bit order are the document's; the clocked form is this
// design's.
module rcv_deserializer (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,      // clear line (read or initialize)
  input  logic       strobe,     // take one bit
  input  logic       serial_in,  // synchronised IMP data
  input  logic       lidb,       // synchronised last IMP data bit
  output logic [7:0] data,       // INBUF bits 7:0
  output logic [3:0] count,      // bits received since last clear
  output logic       full,       // 8 bits received
  output logic       ldb_ff      // INBUF bit 11
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data   <= '0;
      count  <= '0;
      ldb_ff <= 1'b0;
    end else if (clear) begin
      data   <= '0;
      count  <= '0;
      ldb_ff <= 1'b0;
    end else if (strobe) begin
      data   <= {data[6:0], serial_in};
      count  <= count + 4'd1;
      ldb_ff <= lidb;
    end
  end

  assign full = count[3];
endmodule
