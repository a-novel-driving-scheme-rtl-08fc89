// tb_fcdds_latch2: checks latch circuit 2 in both modes and both shift
// directions against a model: row-mode shifting of random serial bits with
// the serial output, column-mode parallel load (mirrored for shl=0), and
// that nothing moves without a CL1 strobe.
module tb_fcdds_latch2;
  localparam int unsigned NCH = 80;

  logic clk = 0, rst_n = 0;
  logic ch1, shl, cl1, ser_in, ser_out;
  logic [NCH-1:0] par_in, q, model;
  int checks = 0, failures = 0;

  fcdds_latch2 #(.NCH(NCH)) dut (
    .clk(clk), .rst_n(rst_n), .ch1(ch1), .shl(shl), .cl1(cl1),
    .ser_in(ser_in), .par_in(par_in), .q(q), .ser_out(ser_out));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ch1 = 0; shl = 1; cl1 = 0; ser_in = 0; par_in = '0; model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      logic exp_out;
      @(negedge clk);
      if (it % 250 == 0) begin
        ch1 = $urandom_range(1);
        shl = $urandom_range(1);
      end
      cl1    = $urandom_range(1);
      ser_in = $urandom_range(1);
      par_in = {$urandom, $urandom, $urandom};
      #1;
      exp_out = shl ? model[NCH-1] : model[0];
      checks++;
      if (ser_out !== exp_out) begin failures++; $display("FAIL ser_out it=%0d", it); end
      @(posedge clk);
      if (cl1) begin
        if (ch1) begin
          for (int i = 0; i < NCH; i++) model[i] = shl ? par_in[i] : par_in[NCH-1-i];
        end else if (shl) model = {model[NCH-2:0], ser_in};
        else              model = {ser_in, model[NCH-1:1]};
      end
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL it=%0d ch1=%0d shl=%0d q=%h expected %h", it, ch1, shl, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
