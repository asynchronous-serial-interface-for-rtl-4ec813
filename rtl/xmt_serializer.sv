// xmt_serializer: parallel-to-serial data path of the transmitter.
//
// A 4-bit binary counter (the card's 74193) picks which OUTBUF data bit is on
// the Host Data line through an 8-input multiplexer (the 74152): count 0
// selects bit 7, count 7 selects bit 0, so the most significant bit goes out
// first. `advance` (one cycle, from the T4 pulse in xmt_control) adds one;
// when the count reaches 8 its top bit, `done`, stops further counting and
// is used by the controller as the end-of-byte / interrupt signal. `clr`
// (load pulse or initialize) returns the count to zero.
//
// Last Host Data Bit (LHDB) is asserted while OUTBUF bit 11 is set and the
// counter is selecting the last bit of the byte (count 7), so it has the same
// timing as the data bit it marks. Both outputs are combinational from the
// counter and OUTBUF; they change only in the cycle after `advance` or `clr`.
// The counter/multiplexer structure and the MSB-first order follow the
// document; the synchronous counter in place of a ripple TTL part is this
// design's choice.
module xmt_serializer (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,        // load pulse or initialize: count to 0
  input  logic       advance,    // one-cycle count enable
  input  logic [7:0] data,       // OUTBUF bits 7:0
  input  logic       last_byte,  // OUTBUF bit 11
  output logic       host_data,  // serial data to the IMP
  output logic       lhdb,       // last host data bit
  output logic [3:0] count,      // bits sent so far
  output logic       done        // count reached 8
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    count <= '0;
    else if (clr)                  count <= '0;
    else if (advance && !count[3]) count <= count + 4'd1;
  end

  assign done      = count[3];
  assign host_data = data[3'd7 - count[2:0]];
  assign lhdb      = last_byte && (count == 4'd7);
endmodule
