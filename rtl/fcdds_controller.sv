// fcdds_controller: chip-enable controller of the FLCD driver in column mode.
//
// Column drivers are cascaded: the first chip's E input is tied active, and
// each chip's CAR output enables the next one. While a chip is enabled
// (en = column mode and E active) every CL2 strobe takes one nibble of D0-D3
// into latch circuit 1; the controller counts these nibbles. When all NGRP
// nibbles are in, the chip is full: it takes no more data and raises car
// (CAR active), so the next chip takes the following CL2 strobes. A CL1
// strobe (end of the line) clears the count for the next line; CL1 wins if
// both strobes come in the same cycle.
//
// Timing: one clock, cl1/cl2 are one-cycle strobes. take is combinational
// (cl2 & en & ~full) and names the nibble to write with cnt. car follows
// the count register, so it rises the cycle after the last nibble is taken.
// The cascade and the "automatic chip enable" follow the STN driver the
// scheme modifies; the counter form and the strobe timing are this design's.
module fcdds_controller #(
  parameter int unsigned NGRP = fcdds_pkg::DRV_CHANNELS / fcdds_pkg::DRV_NIBBLE,
  localparam int unsigned CW  = $clog2(NGRP + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          cl1,
  input  logic          cl2,
  output logic [CW-1:0] cnt,
  output logic          take,
  output logic          car
);

  logic full;

  assign full = (cnt == CW'(NGRP));
  assign take = cl2 & en & ~full & ~cl1;
  assign car  = full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      cnt <= '0;
    else if (cl1)    cnt <= '0;
    else if (take)   cnt <= cnt + 1'b1;
  end

  // The count never passes the number of nibbles the latch holds.
  a_cnt_bound: assert property (@(posedge clk) disable iff (!rst_n) cnt <= CW'(NGRP));

endmodule
