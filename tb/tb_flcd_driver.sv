// tb_flcd_driver: one driver chip at its full 80 outputs.
//   Column mode: loads a random line as 20 nibbles with CL2 while enabled,
//   checks that CAR goes active exactly after the 20th nibble and that later
//   nibbles and nibbles sent while disabled are ignored, strobes CL1 and
//   compares every output level for all four (F,S) slots with the scheme's
//   column state table. Run with shl=1 and shl=0.
//   Row mode: shifts one scan bit through with CL1, checks at every line
//   that exactly the selected output carries the selected-row waveform and
//   the others the non-selected one, and that the bit leaves on CAR after
//   80 lines. Both shift directions.
module tb_flcd_driver;
  import fcdds_pkg::*;
  import tb_fcdds_ref_pkg::*;

  localparam int unsigned NCH = 80, NIB = 4, NGRP = NCH / NIB;

  logic clk = 0, rst_n = 0;
  logic ch1, shl, e_n, car_n, cl1, cl2, f, s;
  logic [NIB-1:0] d;
  level_e [NCH-1:0] y;
  int checks = 0, failures = 0;

  flcd_driver #(.NCH(NCH), .NIB(NIB)) dut (
    .clk(clk), .rst_n(rst_n), .ch1(ch1), .shl(shl), .e_n(e_n), .car_n(car_n),
    .cl1(cl1), .cl2(cl2), .d(d), .f(f), .s(s), .y_level(y));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL %s: %0d expected %0d (t=%0t)", what, got, exp_v, $time);
    end
  endtask

  task automatic strobe_cl1();
    @(negedge clk); cl1 = 1;
    @(negedge clk); cl1 = 0;
  endtask

  task automatic column_test(bit dir);
    logic [NCH-1:0] line;
    ch1 = 1; shl = dir; e_n = 1;
    strobe_cl1();                      // restart the nibble count
    line = {$urandom, $urandom, $urandom};
    // Nibbles while disabled must not be taken.
    @(negedge clk); d = 4'hF; cl2 = 1;
    @(negedge clk); cl2 = 0; e_n = 0;
    for (int g = 0; g < NGRP; g++) begin
      @(negedge clk);
      check("car_n before full", int'(car_n), 1);
      d = line[g*NIB +: NIB]; cl2 = 1;
      @(negedge clk); cl2 = 0;
    end
    #1 check("car_n after 20 nibbles", int'(car_n), 0);
    // Extra nibbles once full are ignored.
    @(negedge clk); d = ~line[NIB-1:0]; cl2 = 1;
    @(negedge clk); cl2 = 0;
    strobe_cl1();
    #1 check("car_n after CL1", int'(car_n), 1);
    for (int fs = 0; fs < 4; fs++) begin
      {f, s} = 2'(fs);
      #1;
      for (int i = 0; i < NCH; i++) begin
        bit c;
        c = dir ? line[i] : line[NCH-1-i];
        check($sformatf("column Y%0d F=%0d S=%0d", i + 1, f, s), int'(y[i]), col_ref(f, s, c));
      end
    end
  endtask

  task automatic row_test(bit dir);
    int sel;
    ch1 = 0; shl = dir; e_n = 0;
    // Flush any scan bit left in the register.
    for (int k = 0; k < NCH; k++) strobe_cl1();
    e_n = 1;
    strobe_cl1();
    e_n = 0;
    for (int line = 0; line < NCH + 1; line++) begin
      sel = dir ? line : NCH - 1 - line;
      for (int fs = 0; fs < 4; fs++) begin
        {f, s} = 2'(fs);
        #1;
        for (int i = 0; i < NCH; i++)
          check($sformatf("row Y%0d line %0d F=%0d S=%0d", i + 1, line, f, s),
                int'(y[i]), row_ref(f, s, line < NCH && i == sel));
      end
      check("row car_n", int'(car_n), int'(line == NCH - 1));
      strobe_cl1();
    end
  endtask

  initial begin
    ch1 = 1; shl = 1; e_n = 1; cl1 = 0; cl2 = 0; d = '0; f = 0; s = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    column_test(1);
    column_test(0);
    column_test(1);
    row_test(1);
    row_test(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
