// tb_fcdds_latch1: writes random nibbles to random slots of latch circuit 1
// and compares the parallel output with a model after every clock.
module tb_fcdds_latch1;
  localparam int unsigned NCH = 80, NIB = 4, NGRP = NCH / NIB;

  logic clk = 0, rst_n = 0;
  logic [NGRP-1:0] we;
  logic [NIB-1:0]  d;
  logic [NCH-1:0]  q, model;
  int checks = 0, failures = 0;

  fcdds_latch1 #(.NCH(NCH), .NIB(NIB)) dut (.clk(clk), .rst_n(rst_n), .we(we), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = '0; d = '0; model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (q !== '0) begin failures++; $display("FAIL not cleared by reset"); end
    for (int it = 0; it < 400; it++) begin
      int g;
      g  = $urandom_range(NGRP - 1);
      we = '0;
      if ($urandom_range(3) != 0) we[g] = 1'b1;
      d  = NIB'($urandom);
      @(posedge clk);
      if (we[g]) for (int i = 0; i < NIB; i++) model[g*NIB + i] = d[i];
      @(negedge clk);
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL it=%0d q=%h expected %h", it, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
