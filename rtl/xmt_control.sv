// xmt_control: handshake and control logic of the transmitter.
//
// The IMP raises Ready For Next Host Bit (RFNHB); if the transmitter is
// enabled, not held off and has bits left, the card answers with There's
// Your Host Bit (TYHB). The IMP lowers RFNHB to accept the bit. That falling
// edge fires the T4 one-shot (nominally 1 us); the pulse's leading edge
// advances the bit counter (`advance` is high for that one cycle) and TYHB is
// kept low for the whole pulse and for as long after it as RFNHB stays low.
// This serves both the 2-way (pulse) and the 4-way (level) handshake.
//
// The hold-off flip-flop is set whenever transmit enable (DRCSR bit 0, CSR0)
// is low and is cleared by the first load pulse (DR11-C NEW DATA READY) after
// enable goes high; while it is set no handshake happens. A load pulse also
// forces TYHB low for its duration (xmt_serializer clears the counter).
// When the counter reaches 8 (`done`) counting and TYHB stop, and, if
// transmit enable is set, the transmit interrupt request (REQUEST A) is
// raised until the next load or initialize.
//
// `rfnhb` must already be synchronised to `clk`; TYHB follows it after one
// more clock edge at most (it is combinational from registered state).
// Structure and conditions follow the document's transmit section. Gating
// the T4 trigger with the same conditions that allow TYHB (so that RFNHB
// edges while the transmitter is idle do not move the counter) is this
// design's reading of the schematic.
module xmt_control #(
  parameter int unsigned T4_CYCLES = if1822_pkg::T_1US_CYCLES
) (
  input  logic clk,
  input  logic rst_n,
  input  logic init,         // DR11-C INIT
  input  logic load_pulse,   // DR11-C NEW DATA READY
  input  logic xmt_enable,   // DRCSR bit 0 (CSR0)
  input  logic rfnhb,        // synchronised RFNHB from the IMP
  input  logic done,         // bit counter reached 8
  output logic tyhb,         // There's Your Host Bit to the IMP
  output logic advance,      // advance the bit counter (one cycle)
  output logic clr_count,    // clear the bit counter
  output logic holdoff,      // hold-off flip-flop state
  output logic t4_pulse,     // T4 pulse, visible for test
  output logic int_req_a     // transmit interrupt request
);
  logic rfnhb_q;
  logic armed;

  // Hold-off flip-flop: set by transmit enable low, cleared by load pulse.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 holdoff <= 1'b1;
    else if (!xmt_enable || init) holdoff <= 1'b1;
    else if (load_pulse)        holdoff <= 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rfnhb_q <= 1'b0;
    else        rfnhb_q <= rfnhb;
  end

  assign armed     = xmt_enable && !holdoff && !done && !load_pulse && !init;
  assign advance   = armed && rfnhb_q && !rfnhb && !t4_pulse;
  assign clr_count = load_pulse || init;

  one_shot #(.WIDTH(T4_CYCLES)) u_t4 (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear   (init),
    .trigger (advance),
    .pulse   (t4_pulse)
  );

  assign tyhb      = armed && rfnhb && !t4_pulse;
  assign int_req_a = xmt_enable && done;
endmodule
