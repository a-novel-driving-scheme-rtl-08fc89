// fcdds_selector: nibble selector in front of latch circuit 1.
//
// Decodes the controller's nibble count into a one-hot write enable: when
// take is high, nibble slot cnt of latch circuit 1 is written from D0-D3;
// otherwise no slot is. Counts of NGRP and above select nothing.
// Combinational. The selector is named by the driver's block diagram; the
// one-hot decoder is this design's reading of it.
module fcdds_selector #(
  parameter int unsigned NGRP = fcdds_pkg::DRV_CHANNELS / fcdds_pkg::DRV_NIBBLE,
  localparam int unsigned CW  = $clog2(NGRP + 1)
) (
  input  logic            take,
  input  logic [CW-1:0]   cnt,
  output logic [NGRP-1:0] we
);

  always_comb begin
    we = '0;
    for (int unsigned g = 0; g < NGRP; g++)
      we[g] = take && (cnt == CW'(g));
  end

endmodule
