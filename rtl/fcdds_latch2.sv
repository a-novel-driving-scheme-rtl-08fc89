// fcdds_latch2: latch circuit 2 of the FLCD driver, an NCH-bit latch that is
// also a bidirectional shift register.
//
// Its bit i is the R (row mode) or C (column mode) value for output Y(i+1),
// read by the data encoder. Everything happens on a CL1 strobe (line clock):
//   row mode (ch1=0): shift the scan bit one output on. shl=1 shifts from
//     Y1 towards Y80: ser_in enters bit 0 and bit NCH-1 is ser_out.
//     shl=0 shifts the other way: ser_in enters bit NCH-1, bit 0 is ser_out.
//   column mode (ch1=1): load the line from latch circuit 1. With shl=1
//     par_in bit i goes to output i; with shl=0 the order is mirrored, so the
//     first data of a line lands on Y80.
// ser_out is combinational from the register, so chained chips all shift on
// the same strobe. Reset clears it. Function and name come from the driver's
// block diagram; the mirrored column load for shl=0 is this design's choice.
module fcdds_latch2 #(
  parameter int unsigned NCH = fcdds_pkg::DRV_CHANNELS
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           ch1,
  input  logic           shl,
  input  logic           cl1,
  input  logic           ser_in,
  input  logic [NCH-1:0] par_in,
  output logic [NCH-1:0] q,
  output logic           ser_out
);

  logic [NCH-1:0] par_mirror;

  always_comb
    for (int unsigned i = 0; i < NCH; i++)
      par_mirror[i] = par_in[NCH-1-i];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else if (cl1) begin
      if (ch1)      q <= shl ? par_in : par_mirror;
      else if (shl) q <= {q[NCH-2:0], ser_in};
      else          q <= {ser_in, q[NCH-1:1]};
    end
  end

  assign ser_out = shl ? q[NCH-1] : q[0];

endmodule
