// tb_flcd_drive: exhaustive check of the output-stage level selection
// against the row and column (M,D) state tables, on several channels at once.
module tb_flcd_drive;
  import fcdds_pkg::*;

  localparam int unsigned NCH = 8;
  localparam int ROW_MD [4] = '{1, 3, 2, 0};   // index {M,D}
  localparam int COL_MD [4] = '{1, 0, 2, 3};

  logic             ch1;
  logic   [NCH-1:0] m, d;
  level_e [NCH-1:0] y;
  int checks = 0, failures = 0;

  flcd_drive #(.NCH(NCH)) dut (.ch1(ch1), .m(m), .d(d), .y_level(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 64; it++) begin
      ch1 = it[0];
      m   = NCH'($urandom);
      d   = NCH'($urandom);
      #1;
      for (int i = 0; i < NCH; i++) begin
        int exp_l;
        exp_l = ch1 ? COL_MD[{m[i], d[i]}] : ROW_MD[{m[i], d[i]}];
        checks++;
        if (int'(y[i]) != exp_l) begin
          failures++;
          $display("FAIL ch1=%0d M=%0d D=%0d: V%0d, expected V%0d", ch1, m[i], d[i], int'(y[i]), exp_l);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
