// flcd_drive: voltage selection logic of the FLCD drive circuits.
//
// Each output of the chip is connected through one of four switches to the
// supply levels V0..V3. This block decides, per output, which switch is
// closed, from the select pair (M, D) made by fcdds_encoder. The mapping is
// the STN driver's own pair of state tables, one for row mode and one for
// column mode:
//
//          M D : 00  01  10  11
//   row  (CH1=0): V1  V3  V2  V0
//   col  (CH1=1): V1  V0  V2  V3
//
// Combinational. The analog switches themselves are outside this model: the
// output is the code (fcdds_pkg::level_e) of the level that is connected.
module flcd_drive
  import fcdds_pkg::*;
#(
  parameter int unsigned NCH = fcdds_pkg::DRV_CHANNELS
) (
  input  logic             ch1,
  input  logic   [NCH-1:0] m,
  input  logic   [NCH-1:0] d,
  output level_e [NCH-1:0] y_level
);

  always_comb begin
    for (int unsigned i = 0; i < NCH; i++) begin
      unique case ({ch1, m[i], d[i]})
        3'b000:  y_level[i] = LV1;
        3'b001:  y_level[i] = LV3;
        3'b010:  y_level[i] = LV2;
        3'b011:  y_level[i] = LV0;
        3'b100:  y_level[i] = LV1;
        3'b101:  y_level[i] = LV0;
        3'b110:  y_level[i] = LV2;
        default: y_level[i] = LV3;
      endcase
    end
  end

endmodule
