// tb_fcdds_panel: end-to-end test of the whole 640 x 400 drive system at its
// default size.
//
// The testbench plays the display controller: for every line it strobes CL1
// (FLM high on the first line of a frame), holds S low for the first tau
// and high for the second, and sends the next line's 160 nibbles with CL2.
// Three images are shown, each as a '0' frame (F=0) followed by a '1' frame
// (F=1), after one priming line that loads the first line's data. The third
// is shown with shl=0, after one idle line that lets the last scan bit leave
// the row chain; each chip then serves its 80 lines in reverse order.
//
// A panel model integrates what every pixel sees once per tau slot:
// v = row level - column level (in Vcc/3 units). +Vcc switches a pixel off,
// -Vcc switches it on, +-Vcc/3 leaves it alone. Checked:
//   - every row and column level against the scheme's state tables,
//   - no pixel ever sees +-2Vcc/3 and the swing reaches both +Vcc and -Vcc,
//   - after each '0'+'1' frame pair the panel shows the image, starting
//     from random pixel states,
//   - after each pair the net DC on every pixel is zero.
// Mechanisms counted (each must occur): pixels switched off, pixels
// switched on, frame slot changes, scan bit passed between row chips,
// column chip enable handed on through CAR, lines scanned with shl=0.
module tb_fcdds_panel;
  import fcdds_pkg::*;
  import tb_fcdds_ref_pkg::*;

  localparam int ROWS  = 400;
  localparam int COLS  = 640;
  localparam int NCH   = 80;
  localparam int TAU   = 100;              // switching time in clocks
  localparam int LINE  = 2 * TAU;
  localparam int NNIB  = COLS / DRV_NIBBLE;
  localparam int NIMG  = 3;                // image 2 is shown with shl=0
  // priming line, images 0 and 1, one idle line to change SHL, image 2
  localparam int NSLOT = 1 + 2 * NIMG * ROWS + 1;

  logic clk = 0, rst_n = 0;
  logic flm, cl1, cl2, f, s, shl;
  logic [DRV_NIBBLE-1:0] d;
  level_e [ROWS-1:0] row_level;
  level_e [COLS-1:0] col_level;

  fcdds_panel dut (
    .clk(clk), .rst_n(rst_n), .flm(flm), .cl1(cl1), .cl2(cl2), .d(d),
    .f(f), .s(s), .shl(shl), .row_level(row_level), .col_level(col_level));

  always #5 clk = ~clk;

  bit img [NIMG][ROWS][COLS];
  bit pix [ROWS][COLS];
  int dc  [ROWS][COLS];

  int checks = 0, failures = 0;
  int n_off = 0, n_on = 0, n_fswitch = 0, n_row_carry = 0, n_col_carry = 0;
  int vmax = 0, vmin = 0;

  initial begin
    repeat (NSLOT * LINE + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 20) $display("FAIL %s: %0d expected %0d (t=%0t)", what, got, exp_v, $time);
    end
  endtask

  // What each line slot shows: image, frame slot, line (-1: no row is
  // selected, the columns carry zeros) and the SHL setting.
  int slot_im [NSLOT];
  bit slot_fr [NSLOT];
  int slot_ln [NSLOT];
  bit slot_shl[NSLOT];

  function automatic void build_slots();
    int j;
    j = 0;
    slot_im[j] = 0; slot_fr[j] = 0; slot_ln[j] = -1; slot_shl[j] = 1; j++;
    for (int im = 0; im < NIMG; im++) begin
      if (im == 2) begin
        // Idle line so the last scan bit leaves the row chain before the
        // shift direction is reversed.
        slot_im[j] = im; slot_fr[j] = 0; slot_ln[j] = -1; slot_shl[j] = 1; j++;
      end
      for (int fr = 0; fr < 2; fr++)
        for (int ln = 0; ln < ROWS; ln++) begin
          slot_im[j] = im; slot_fr[j] = bit'(fr); slot_ln[j] = ln;
          slot_shl[j] = (im != 2); j++;
        end
    end
  endfunction

  // Output position of logical line or column x: with shl=0 each chip
  // serves its 80 lines in reverse order.
  function automatic int phys(int x, bit dir);
    return dir ? x : (x / NCH) * NCH + NCH - 1 - x % NCH;
  endfunction

  // Column chip hand-over: count CAR going active on every chip but the last.
  for (genvar k = 1; k < COLS / NCH; k++) begin : g_carmon
    always @(negedge dut.col_link[k]) if (rst_n) n_col_carry++;
  end

  // Apply one tau slot of levels to the panel model and check the levels.
  task automatic sample_slot(int j);
    int im, ln, bad;
    bit fr, dir;
    bad = 0;
    im = slot_im[j]; fr = slot_fr[j]; ln = slot_ln[j]; dir = slot_shl[j];
    for (int r = 0; r < ROWS; r++)
      check($sformatf("row %0d level", r), int'(row_level[r]),
            row_ref(fr, s, ln >= 0 && r == phys(ln, dir)));
    for (int c = 0; c < COLS; c++)
      check($sformatf("col %0d level", c), int'(col_level[c]),
            col_ref(fr, s, (ln >= 0) ? img[im][ln][phys(c, dir)] : 1'b0));
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        int v;
        v = int'(row_level[r]) - int'(col_level[c]);
        dc[r][c] += v;
        if (v > vmax) vmax = v;
        if (v < vmin) vmin = v;
        if (v == 2 || v == -2) bad++;
        if (v == 3 && pix[r][c])  begin pix[r][c] = 1'b0; n_off++; end
        if (v == -3 && !pix[r][c]) begin pix[r][c] = 1'b1; n_on++; end
      end
    check("pixels at +-2Vcc/3", bad, 0);
  endtask

  task automatic check_image(int im, bit dir);
    int wrong, dcbad;
    wrong = 0; dcbad = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        if (pix[phys(r, dir)][phys(c, dir)] != img[im][r][c]) wrong++;
        if (dc[r][c] != 0) dcbad++;
      end
    check($sformatf("pixels differing from image %0d", im), wrong, 0);
    check($sformatf("pixels with net DC after image %0d", im), dcbad, 0);
  endtask

  initial begin
    int ln, nim, nln, prev_sel, n_mirror;
    bit prev_f;
    flm = 0; cl1 = 0; cl2 = 0; d = '0; f = 0; s = 0; shl = 1;
    build_slots();
    for (int i = 0; i < NIMG; i++)
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) img[i][r][c] = bit'($urandom);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        pix[r][c] = bit'($urandom);
        dc[r][c]  = 0;
      end
    prev_f = 0; prev_sel = -1; n_mirror = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < NSLOT; j++) begin
      ln = slot_ln[j];
      if (j + 1 < NSLOT) begin nim = slot_im[j + 1]; nln = slot_ln[j + 1]; end
      else begin nim = 0; nln = -1; end
      for (int t = 0; t < LINE; t++) begin
        @(negedge clk);
        cl1 = (t == 0);
        flm = (t == 0) && (ln == 0);
        if (t == 0) begin
          f   = slot_fr[j];
          shl = slot_shl[j];
          if (f != prev_f) n_fswitch++;
          if (!shl && ln >= 0) n_mirror++;
          prev_f = f;
        end
        s = (t >= TAU);
        cl2 = (t >= 1 && t <= NNIB && j + 1 < NSLOT);
        if (cl2)
          for (int i = 0; i < DRV_NIBBLE; i++)
            d[i] = (nln >= 0) ? img[nim][nln][(t - 1) * DRV_NIBBLE + i] : 1'b0;
        if (t == TAU - 1 || t == LINE - 1) begin
          #1;
          sample_slot(j);
          if (t == TAU - 1 && ln >= 0) begin
            if (ln % NCH == 0 && ln > 0 && prev_sel == ln - 1) n_row_carry++;
            prev_sel = ln;
          end
        end
      end
      if (ln == ROWS - 1 && slot_fr[j] == 1'b1) check_image(slot_im[j], slot_shl[j]);
    end
    check("swing reaches +Vcc", vmax, 3);
    check("swing reaches -Vcc", vmin, -3);
    check("pixels switched off", int'(n_off > 0), 1);
    check("pixels switched on", int'(n_on > 0), 1);
    check("frame slot changes", int'(n_fswitch > 0), 1);
    check("scan bit passed between row chips", n_row_carry, NIMG * 2 * (ROWS / NCH - 1));
    check("column chip enable handed on", int'(n_col_carry > 0), 1);
    check("lines scanned with reversed shift direction", n_mirror, 2 * ROWS);
    $display("switched off %0d, on %0d, frame changes %0d, row chip carries %0d, column chip carries %0d, reversed lines %0d",
             n_off, n_on, n_fswitch, n_row_carry, n_col_carry, n_mirror);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
