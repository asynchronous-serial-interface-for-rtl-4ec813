// one_shot: retriggerable pulse generator, the clocked counterpart of one
// half of a 74123 monostable.
//
// A one-cycle `trigger` starts (or restarts) a pulse of WIDTH clock cycles on
// `pulse`, which rises on the clock edge that samples the trigger. `clear`
// ends the pulse at once and blocks triggering, as the 74123 clear input
// does. On the card every one-shot (T1 deskew, T2 hold, T3 clear, T4 transmit
// advance) is set to 1 us; WIDTH is that time in clock cycles. The 74123 is
// retriggerable, so a trigger during a pulse restarts the full width.
module one_shot #(
  parameter int unsigned WIDTH = 10
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic trigger,
  output logic pulse
);
  localparam int unsigned CW = (WIDTH < 2) ? 1 : $clog2(WIDTH + 1);

  logic [CW-1:0] remaining;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                remaining <= '0;
    else if (clear)            remaining <= '0;
    else if (trigger)          remaining <= CW'(WIDTH);
    else if (remaining != '0)  remaining <= remaining - 1'b1;
  end

  assign pulse = (remaining != '0);

  initial begin
    assert (WIDTH >= 1) else $error("one_shot: WIDTH must be at least 1");
  end
endmodule
