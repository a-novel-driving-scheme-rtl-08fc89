// fcdds_latch1: latch circuit 1 of the FLCD driver (NIB bits x NGRP).
//
// Collects one line of column data for one chip. Slot g holds the nibble
// for outputs g*NIB .. g*NIB+NIB-1; data bit D[i] of a nibble goes to output
// g*NIB+i. A slot is written on the clock edge where its enable we[g] is
// high (the selector raises at most one). The contents stay until written
// again and are read in parallel by latch circuit 2 on CL1. Reset clears it.
// Organisation (4-bit x 20 for 80 outputs) follows the driver's block
// diagram; the bit order within a nibble is this design's choice.
module fcdds_latch1 #(
  parameter int unsigned NCH  = fcdds_pkg::DRV_CHANNELS,
  parameter int unsigned NIB  = fcdds_pkg::DRV_NIBBLE,
  localparam int unsigned NGRP = NCH / NIB
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NGRP-1:0] we,
  input  logic [NIB-1:0]  d,
  output logic [NCH-1:0]  q
);

  logic [NGRP-1:0][NIB-1:0] mem;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mem <= '0;
    else
      for (int unsigned g = 0; g < NGRP; g++)
        if (we[g]) mem[g] <= d;
  end

  assign q = mem;

  a_we_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(we));

endmodule
