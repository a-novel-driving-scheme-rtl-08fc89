// fcdds_panel: drive system of a ROWS x COLS ferroelectric LC panel using the
// frame change data driving scheme (FCDDS).
//
// An FLC pixel is bistable: it is switched on by a pulse of one polarity and
// off by the other, and its net DC voltage must stay zero. FCDDS gets a
// bipolar +-Vcc across the pixel from drivers that only output 0..Vcc: in
// the '0' frame (F=0) every row is scanned and pixels with data 0 are
// switched off; in the '1' frame (F=1) all row and column levels are
// mirrored about Vcc/2 and pixels with data 1 are switched on. Each line
// takes two switching times (S=0, S=1).
//
// Structure: ROWS/NCH driver chips in row mode chained through E/CAR, the
// first fed by FLM, and COLS/NCH chips in column mode chained through
// E/CAR, the first enabled permanently. All share CL1 (line strobe), CL2
// (nibble strobe), D0-D3, F, S and SHL. With the defaults this is the
// 640 x 400 panel with 5 row and 8 column chips of 80 outputs.
//
// Use: for each line, strobe CL1 (with flm high on the first line of a
// frame) and then present the COLS/NIB nibbles of the next line with CL2
// strobes, keeping F for the whole frame and S low for the first half of the
// line and high for the second. Line n's data must therefore be sent during
// line n-1. row_level[r] and col_level[c] are the levels on scan line r+1
// and data line c+1 (with shl=1), valid one clock after CL1. With shl=0
// each chip serves its NCH lines in reverse order; change SHL only while no
// scan bit is in the row chain (one idle line with FLM low clears it). The
// carry of the last chip of each chain has no successor and is left open.
// The chip counts and cascade follow the scheme's panel block diagram; the
// display controller that makes FLM, CL1, CL2, D, F and S is not part of it.
module fcdds_panel
  import fcdds_pkg::*;
#(
  parameter int unsigned ROWS = 400,
  parameter int unsigned COLS = 640,
  parameter int unsigned NCH  = fcdds_pkg::DRV_CHANNELS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              flm,
  input  logic              cl1,
  input  logic              cl2,
  input  logic [DRV_NIBBLE-1:0] d,
  input  logic              f,
  input  logic              s,
  input  logic              shl,
  output level_e [ROWS-1:0] row_level,
  output level_e [COLS-1:0] col_level
);

  localparam int unsigned NROWCHIP = ROWS / NCH;
  localparam int unsigned NCOLCHIP = COLS / NCH;

  if (ROWS % NCH != 0 || COLS % NCH != 0) begin : g_bad_size
    $error("ROWS and COLS must be multiples of NCH");
  end

  // Cascade links: link[0] feeds the first chip's E, link[k+1] is chip k's CAR.
  logic [NROWCHIP:0] row_link;
  logic [NCOLCHIP:0] col_link;

  assign row_link[0] = flm;
  assign col_link[0] = 1'b0;

  for (genvar k = 0; k < NROWCHIP; k++) begin : g_row
    flcd_driver #(.NCH(NCH), .NIB(DRV_NIBBLE)) u_drv (
      .clk    (clk),
      .rst_n  (rst_n),
      .ch1    (1'b0),
      .shl    (shl),
      .e_n    (row_link[k]),
      .car_n  (row_link[k+1]),
      .cl1    (cl1),
      .cl2    (cl2),
      .d      (d),
      .f      (f),
      .s      (s),
      .y_level(row_level[k*NCH +: NCH])
    );
  end

  for (genvar k = 0; k < NCOLCHIP; k++) begin : g_col
    flcd_driver #(.NCH(NCH), .NIB(DRV_NIBBLE)) u_drv (
      .clk    (clk),
      .rst_n  (rst_n),
      .ch1    (1'b1),
      .shl    (shl),
      .e_n    (col_link[k]),
      .car_n  (col_link[k+1]),
      .cl1    (cl1),
      .cl2    (cl2),
      .d      (d),
      .f      (f),
      .s      (s),
      .y_level(col_level[k*NCH +: NCH])
    );
  end

endmodule
