// rcv_control: handshake, clear line and interrupt logic of the receiver.
//
// Ready For Next IMP Bit (RFNIB) is high while the receiver is enabled
// (DRCSR bit 1, CSR1), the byte is not complete (fewer than 8 bits and no
// Last Data Bit taken), the clear line is inactive, and no bit is being
// taken. When There's Your IMP Bit (TYIB) is high in that state the T1
// one-shot starts; T1 lets the data and LIDB lines settle relative to TYIB.
// At the end of T1 a one-cycle `strobe` takes the bit and RFNIB falls. RFNIB
// then stays low for the T2 one-shot and, after that, until TYIB has fallen,
// which satisfies the 4-way handshake and the minimum pulse width of the
// 2-way one. The states are IDLE (ready), DESKEW (T1 running), HOLD (T2
// running or TYIB still high).
//
// The clear line is the initialize pulse or the T3 one-shot (1 us) started
// by the trailing edge of the DR11-C read pulse (DATA TRANSMITTED). While it
// is active TYIB is ignored and T2 is stopped; it also empties the data
// register, bit counter and flip-flops (in rcv_deserializer and
// imp_power_sense). A clear during DESKEW drops that bit: the controller
// goes to HOLD without a strobe. HOLD is left only when the raw TYIB line
// is low, even during a clear, so a bit still offered when the program
// reads INBUF is not taken twice.
//
// The receive interrupt request (REQUEST B) is high while the receiver is
// enabled and 8 bits have arrived, the Last Data Bit flip-flop is set, or
// the IMP power flip-flop is set.
//
// `tyib` must be synchronised to `clk`. RFNIB falls on the clock edge
// after the end of T1, i.e. T1_CYCLES + 1 edges after TYIB is seen high.
// Timing and conditions are the document's; the state encoding is this
// design's.
module rcv_control #(
  parameter int unsigned T1_CYCLES = if1822_pkg::T_1US_CYCLES,
  parameter int unsigned T2_CYCLES = if1822_pkg::T_1US_CYCLES,
  parameter int unsigned T3_CYCLES = if1822_pkg::T_1US_CYCLES
) (
  input  logic clk,
  input  logic rst_n,
  input  logic init,         // DR11-C INIT
  input  logic read_pulse,   // DR11-C DATA TRANSMITTED
  input  logic rcv_enable,   // DRCSR bit 1 (CSR1)
  input  logic tyib,         // synchronised TYIB from the IMP
  input  logic full,         // 8 bits received
  input  logic ldb_ff,       // last data bit flip-flop
  input  logic pwr_ff,       // IMP power change flip-flop
  output logic rfnib,        // Ready For Next IMP Bit to the IMP
  output logic strobe,       // take the bit (one cycle)
  output logic clear,        // clear line
  output logic int_req_b     // receive interrupt request
);
  typedef enum logic [1:0] {IDLE, DESKEW, HOLD} rcv_state_e;

  rcv_state_e state, state_n;
  logic read_q;
  logic t1_pulse, t2_pulse, t3_pulse;
  logic t1_start;
  logic ready;
  logic tyib_eff;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) read_q <= 1'b0;
    else        read_q <= read_pulse;
  end

  // T3: 1 us after the trailing edge of the read pulse.
  one_shot #(.WIDTH(T3_CYCLES)) u_t3 (
    .clk(clk), .rst_n(rst_n), .clear(init),
    .trigger(read_q && !read_pulse), .pulse(t3_pulse)
  );

  assign clear    = init || t3_pulse;
  assign tyib_eff = tyib && !clear;
  assign ready    = rcv_enable && !full && !ldb_ff && !clear;
  assign t1_start = (state == IDLE) && ready && tyib_eff;

  one_shot #(.WIDTH(T1_CYCLES)) u_t1 (
    .clk(clk), .rst_n(rst_n), .clear(clear),
    .trigger(t1_start), .pulse(t1_pulse)
  );

  assign strobe = (state == DESKEW) && !t1_pulse && !clear;

  one_shot #(.WIDTH(T2_CYCLES)) u_t2 (
    .clk(clk), .rst_n(rst_n), .clear(clear),
    .trigger(strobe), .pulse(t2_pulse)
  );

  always_comb begin
    state_n = state;
    unique case (state)
      IDLE:    if (t1_start) state_n = DESKEW;
      DESKEW:  if (clear || !t1_pulse) state_n = HOLD;
      HOLD:    if (!t2_pulse && !tyib) state_n = IDLE;
      default: state_n = IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= IDLE;
    else        state <= state_n;
  end

  assign rfnib     = ready && (state == IDLE || state == DESKEW);
  assign int_req_b = rcv_enable && (full || ldb_ff || pwr_ff);

  // A bit is taken only after the T1 pulse has run.
  property p_strobe_after_deskew;
    @(posedge clk) disable iff (!rst_n)
      strobe |-> $past(state == DESKEW && t1_pulse);
  endproperty
  assert property (p_strobe_after_deskew)
    else $error("rcv_control: strobe without T1 deskew");
endmodule
