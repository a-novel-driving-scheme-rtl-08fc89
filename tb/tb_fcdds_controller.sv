// tb_fcdds_controller: checks nibble counting, the enable gate, the carry
// raised when the chip is full (and held until CL1), and the CL1 restart,
// against a cycle model.
module tb_fcdds_controller;
  localparam int unsigned NGRP = 20;
  localparam int unsigned CW   = $clog2(NGRP + 1);

  logic clk = 0, rst_n = 0;
  logic en, cl1, cl2, take, car;
  logic [CW-1:0] cnt;
  int checks = 0, failures = 0;
  int mcnt, fulls = 0;

  fcdds_controller #(.NGRP(NGRP)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .cl1(cl1), .cl2(cl2),
    .cnt(cnt), .take(take), .car(car));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  initial begin
    en = 0; cl1 = 0; cl2 = 0; mcnt = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      en  = ($urandom_range(7) != 0);
      cl2 = $urandom_range(1);
      cl1 = ($urandom_range(60) == 0);
      #1;
      check("take", int'(take), int'(cl2 && en && !cl1 && mcnt < NGRP));
      check("car",  int'(car),  int'(mcnt == NGRP));
      check("cnt",  int'(cnt),  mcnt);
      if (car) fulls++;
      @(posedge clk);
      if (cl1) mcnt = 0;
      else if (cl2 && en && mcnt < NGRP) mcnt++;
    end
    check("chip became full at least once", int'(fulls > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
