// dr11c_model: behavioural model of the DEC DR11-C / DRV-11 general device
// interface, for simulation only. It is DEC's product, not part of the card.
//
// Program side: a simple register port. `bus_we`/`bus_re` for one cycle
// with `bus_addr` = 0 (DRCSR), 2 (OUTBUF) or 4 (INBUF); `bus_rdata` is
// combinational. `bus_init` starts an INIT pulse of INIT_CYCLES (10 us) that
// clears DRCSR and OUTBUF. `irq_a`/`irq_b` are the interrupt requests that
// reach the processor: REQUEST A and INT ENB A, REQUEST B and INT ENB B.
// DRCSR reads as {REQ B, 7'b0, REQ A, INT ENB A, INT ENB B, 3'b0, CSR1, CSR0};
// only bits 6, 5, 1 and 0 are writable.
// Device side: `outbuf` holds the last word written; each write to OUTBUF
// gives a NEW DATA READY pulse of PULSE_CYCLES (400 ns), and each read of
// INBUF gives a DATA TRANSMITTED pulse of the same width. `inbuf` is gated
// straight onto the bus, not latched.
module dr11c_model #(
  parameter int unsigned PULSE_CYCLES = 4,
  parameter int unsigned INIT_CYCLES  = 100
) (
  input  logic        clk,
  input  logic        rst_n,
  // program side
  input  logic        bus_init,
  input  logic        bus_we,
  input  logic        bus_re,
  input  logic [2:0]  bus_addr,
  input  logic [15:0] bus_wdata,
  output logic [15:0] bus_rdata,
  output logic        irq_a,
  output logic        irq_b,
  // device side
  output logic [15:0] outbuf,
  output logic        new_data_ready,
  output logic        data_transmitted,
  output logic        init,
  output logic        csr0,
  output logic        csr1,
  input  logic [15:0] inbuf,
  input  logic        req_a,
  input  logic        req_b
);
  logic ie_a, ie_b;
  int unsigned ndr_left, dt_left, init_left;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ie_a <= 0; ie_b <= 0; csr0 <= 0; csr1 <= 0; outbuf <= '0;
      ndr_left <= 0; dt_left <= 0; init_left <= 0;
    end else begin
      if (ndr_left != 0)  ndr_left  <= ndr_left - 1;
      if (dt_left != 0)   dt_left   <= dt_left - 1;
      if (init_left != 0) init_left <= init_left - 1;
      if (bus_init) begin
        init_left <= INIT_CYCLES;
        ie_a <= 0; ie_b <= 0; csr0 <= 0; csr1 <= 0; outbuf <= '0;
      end else if (bus_we && bus_addr == 3'd0) begin
        ie_a <= bus_wdata[6]; ie_b <= bus_wdata[5];
        csr1 <= bus_wdata[1]; csr0 <= bus_wdata[0];
      end else if (bus_we && bus_addr == 3'd2) begin
        outbuf   <= bus_wdata;
        ndr_left <= PULSE_CYCLES;
      end else if (bus_re && bus_addr == 3'd4) begin
        dt_left <= PULSE_CYCLES;
      end
    end
  end

  assign new_data_ready   = (ndr_left != 0);
  assign data_transmitted = (dt_left != 0);
  assign init             = (init_left != 0);
  assign irq_a            = req_a && ie_a;
  assign irq_b            = req_b && ie_b;

  always_comb begin
    unique case (bus_addr)
      3'd0:    bus_rdata = {req_b, 7'b0, req_a, ie_a, ie_b, 3'b0, csr1, csr0};
      3'd2:    bus_rdata = outbuf;
      3'd4:    bus_rdata = inbuf;
      default: bus_rdata = '0;
    endcase
  end
endmodule
