// imp_power_sense: IMP power relay sensing and power-change interrupt flag.
//
// The IMP's power relay contacts reach the card as one level, `imp_relay_open`
// (1 = contacts open = IMP power off), after the card's RC debounce network.
// That level, synchronised, is INBUF bit 12. Every change of the level, in
// either direction, makes a pulse: the level is compared, in an exclusive-OR,
// with a copy of itself delayed by PULSE_CYCLES clock cycles, the clocked
// form of the card's exclusive-OR pulse generator whose delay is an RC
// element. The pulse sets the power interrupt flip-flop, INBUF bit 14
// ("IMP was down"), which stays set until the receiver's clear line (read
// of INBUF or initialize). The pulse wins over the clear line while both are
// active, but a clear that outlasts the pulse still empties the flag, as the
// set and clear inputs of the card's 7474 flip-flop do; the change is then
// seen only in bit 12. The flip-flop feeds the receive interrupt request in rcv_control and
// INBUF bit 15. One change gives one interrupt, whichever way it goes.
//
// The synchroniser and the delay line start in the "power off" state, so a
// card that powers up with the IMP down reports no change. The delay of
// 3 cycles stands for the 120 ohm / 0.002 uF element (about 240 ns) at the
// assumed 10 MHz clock.
module imp_power_sense #(
  parameter int unsigned PULSE_CYCLES = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic imp_relay_open,  // asynchronous, 1 = IMP power off
  input  logic clear,           // receiver clear line
  output logic imp_pwr_off,     // INBUF bit 12
  output logic change_pulse,    // exclusive-OR pulse
  output logic pwr_ff           // INBUF bit 14
);
  logic [PULSE_CYCLES-1:0] delayed;

  sync2 #(.RESET_VAL(1'b1)) u_sync (
    .clk(clk), .rst_n(rst_n), .d(imp_relay_open), .q(imp_pwr_off)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) delayed <= '1;
    else        delayed <= {delayed[PULSE_CYCLES-2:0], imp_pwr_off};
  end

  assign change_pulse = imp_pwr_off ^ delayed[PULSE_CYCLES-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            pwr_ff <= 1'b0;
    else if (change_pulse) pwr_ff <= 1'b1;
    else if (clear)        pwr_ff <= 1'b0;
  end

  initial begin
    assert (PULSE_CYCLES >= 2) else $error("imp_power_sense: PULSE_CYCLES must be at least 2");
  end
endmodule
