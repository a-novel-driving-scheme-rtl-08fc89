// tb_fcdds_selector: exhaustive check of the nibble-slot decoder.
module tb_fcdds_selector;
  localparam int unsigned NGRP = 20;
  localparam int unsigned CW   = $clog2(NGRP + 1);

  logic            take;
  logic [CW-1:0]   cnt;
  logic [NGRP-1:0] we;
  int checks = 0, failures = 0;

  fcdds_selector #(.NGRP(NGRP)) dut (.take(take), .cnt(cnt), .we(we));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2; t++)
      for (int c = 0; c < (1 << CW); c++) begin
        logic [NGRP-1:0] exp_we;
        take = t[0];
        cnt  = CW'(c);
        #1;
        exp_we = '0;
        if (take && c < NGRP) exp_we[c] = 1'b1;
        checks++;
        if (we !== exp_we) begin
          failures++;
          $display("FAIL take=%0d cnt=%0d we=%b expected %b", take, c, we, exp_we);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
