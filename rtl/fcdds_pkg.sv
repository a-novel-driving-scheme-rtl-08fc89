// fcdds_pkg: types and sizes shared by the FLC frame-change data driving
// scheme (FCDDS) driver chip and the panel drive system.
//
// A row or column output of the driver sits at one of four levels that a
// resistor ladder makes from a single positive supply Vcc:
//   V0 = 0, V1 = Vcc/3, V2 = 2*Vcc/3, V3 = Vcc   (1/3 bias).
// level_e codes each level as the multiple of Vcc/3 it stands for, so the
// voltage a pixel sees (row level minus column level) is simply the
// difference of two codes, from -3 (-Vcc) to +3 (+Vcc). The four levels and
// the 1/3 bias follow the scheme; the numeric coding is this design's choice.
package fcdds_pkg;

  typedef enum logic [1:0] {
    LV0 = 2'd0,   // 0
    LV1 = 2'd1,   // Vcc/3
    LV2 = 2'd2,   // 2*Vcc/3
    LV3 = 2'd3    // Vcc
  } level_e;

  // Outputs per driver chip and data bus width (D0-D3).
  localparam int unsigned DRV_CHANNELS = 80;
  localparam int unsigned DRV_NIBBLE   = 4;

endpackage
