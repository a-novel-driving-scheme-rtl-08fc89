// flcd_driver: one FLCD driver chip for the frame change data driving scheme.
//
// An STN row/column driver with a modified output decode. CH1 sets the role:
//   column driver (ch1=1): while E (e_n low) enables the chip, each CL2
//     strobe takes one nibble D0-D3 into latch circuit 1 (NCH/NIB slots,
//     filled in order by the controller and selector). When the chip is full
//     car_n goes low and enables the next chip of the cascade. CL1 copies the
//     line into latch circuit 2 and restarts the count.
//   row driver (ch1=0): latch circuit 2 is a shift register. Each CL1 shifts
//     the scan bit one line on; it enters from e_n and leaves on car_n
//     (both active high in this mode), so chips chain directly.
// Latch circuit 2 holds, per output, the bit R (row) or C (column). The data
// encoder combines it with the frame slot F and switching slot S into (M,D),
// and the drive circuits pick one of the four levels V0..V3 for Y1..Y80.
//
// Resulting waveforms over one line time (2 tau, S = 0 then 1):
//   '0' frame (F=0): selected row V1,V3; other rows V1,V1;
//                    column data 0: V2,V0; data 1: V0,V2.
//   '1' frame (F=1): every level is Vcc minus the '0' frame level.
// So a pixel (row minus column) sees +Vcc for one tau only where it must be
// switched off, -Vcc only where it must be switched on, and +-Vcc/3 of zero
// mean everywhere else.
//
// Timing: one clock; cl1 and cl2 are one-cycle strobes, and y_level changes
// the cycle after a CL1 strobe and follows F and S combinationally.
// The block structure (latch circuits 1 and 2, selector, controller, data
// encoder, drive circuits, E/CAR cascade, SHL) is the modified driver's;
// strobes on a chip clock, reset and the row-mode E/CAR polarity are this
// design's choices.
module flcd_driver
  import fcdds_pkg::*;
#(
  parameter int unsigned NCH = fcdds_pkg::DRV_CHANNELS,
  parameter int unsigned NIB = fcdds_pkg::DRV_NIBBLE
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ch1,
  input  logic             shl,
  input  logic             e_n,
  output logic             car_n,
  input  logic             cl1,
  input  logic             cl2,
  input  logic   [NIB-1:0] d,
  input  logic             f,
  input  logic             s,
  output level_e [NCH-1:0] y_level
);

  localparam int unsigned NGRP = NCH / NIB;
  localparam int unsigned CW   = $clog2(NGRP + 1);

  if (NCH % NIB != 0) begin : g_bad_size
    $error("NCH must be a multiple of NIB");
  end

  logic [CW-1:0]   cnt;
  logic            take;
  logic            full;
  logic [NGRP-1:0] we;
  logic [NCH-1:0]  line_data;
  logic [NCH-1:0]  bits;
  logic            ser_out;
  logic [NCH-1:0]  m;
  logic [NCH-1:0]  dsel;

  fcdds_controller #(.NGRP(NGRP)) u_ctrl (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (ch1 & ~e_n),
    .cl1  (cl1),
    .cl2  (cl2),
    .cnt  (cnt),
    .take (take),
    .car  (full)
  );

  fcdds_selector #(.NGRP(NGRP)) u_sel (
    .take(take),
    .cnt (cnt),
    .we  (we)
  );

  fcdds_latch1 #(.NCH(NCH), .NIB(NIB)) u_latch1 (
    .clk  (clk),
    .rst_n(rst_n),
    .we   (we),
    .d    (d),
    .q    (line_data)
  );

  fcdds_latch2 #(.NCH(NCH)) u_latch2 (
    .clk    (clk),
    .rst_n  (rst_n),
    .ch1    (ch1),
    .shl    (shl),
    .cl1    (cl1),
    .ser_in (e_n),
    .par_in (line_data),
    .q      (bits),
    .ser_out(ser_out)
  );

  fcdds_encoder #(.NCH(NCH)) u_enc (
    .f   (f),
    .s   (s),
    .ch1 (ch1),
    .bits(bits),
    .m   (m),
    .d   (dsel)
  );

  flcd_drive #(.NCH(NCH)) u_drive (
    .ch1    (ch1),
    .m      (m),
    .d      (dsel),
    .y_level(y_level)
  );

  assign car_n = ch1 ? ~full : ser_out;

endmodule
