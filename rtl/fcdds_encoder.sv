// fcdds_encoder: data encoder of the FLCD driver chip.
//
// For every output it turns the frame slot F, the switching time slot S and
// the bit held for that output into the select pair (M, D) understood by the
// STN-style output stage (flcd_drive). This is what lets an unmodified STN
// level selector produce the FCDDS waveforms.
//
//   F : 0 = '0' frame (pixels with data 0 are switched off)
//       1 = '1' frame (pixels with data 1 are switched on)
//   S : 0 = first switching slot (tau), 1 = second slot of the line
//   CH1: 0 = row driver, bits = R (1 on the selected scan line)
//        1 = column driver, bits = C (display data)
//
// Equations (purely combinational, no timing of its own):
//   row    : M = F,          D = S & R
//   column : M = S xnor C,   D = F xor S xor C
// The column D term and the row M term are the scheme's Boolean equation.
// The row D term (S & R) and the column M term (S xnor C) are the only
// choices that, through the output stage's tables, give exactly the row and
// column state tables of the scheme (selected row V1 then V3 in the '0'
// frame, V2 then V0 in the '1' frame; column V2/V0 for data 0 and V0/V2 for
// data 1 in the '0' frame, V3/V1 and V1/V3 in the '1' frame). As a result M
// is formed per output in column mode rather than once per chip.
module fcdds_encoder #(
  parameter int unsigned NCH = fcdds_pkg::DRV_CHANNELS
) (
  input  logic           f,
  input  logic           s,
  input  logic           ch1,
  input  logic [NCH-1:0] bits,
  output logic [NCH-1:0] m,
  output logic [NCH-1:0] d
);

  always_comb begin
    for (int unsigned i = 0; i < NCH; i++) begin
      if (ch1) begin
        m[i] = ~(s ^ bits[i]);
        d[i] = f ^ s ^ bits[i];
      end else begin
        m[i] = f;
        d[i] = s & bits[i];
      end
    end
  end

endmodule
