// host_power_latch: the R-S latch behind the host power ("host ready") relay.
//
// OUTBUF bit 12 closes the relay contacts, bit 13 opens them, and with both
// bits clear the latch keeps its state, so the program needs to write each
// bit only once. With both bits set the contacts are closed (set wins).
// The initialize pulse opens the contacts and has priority over both bits.
// `relay_closed` drives the relay coil; `host_pwr_off` is its complement and
// is read back as INBUF bit 13 (1 = contacts open, host power off).
//
// The truth table follows the document. The document calls the state after
// both bits fall together from 1,1 indeterminate (a cross-coupled NOR
// latch); this clocked latch simply keeps the last state (closed). It is
// updated on every clock edge from the OUTBUF levels; the relay itself, and
// its 1 ms contact bounce, are outside the logic.
module host_power_latch (
  input  logic clk,
  input  logic rst_n,
  input  logic init,          // DR11-C INIT: open the contacts
  input  logic set_closed,    // OUTBUF bit 12
  input  logic clear_open,    // OUTBUF bit 13
  output logic relay_closed,  // relay coil drive
  output logic host_pwr_off   // INBUF bit 13
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          relay_closed <= 1'b0;
    else if (init)       relay_closed <= 1'b0;
    else if (set_closed) relay_closed <= 1'b1;
    else if (clear_open) relay_closed <= 1'b0;
  end

  assign host_pwr_off = !relay_closed;
endmodule
