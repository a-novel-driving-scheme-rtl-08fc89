// tb_fcdds_encoder: checks the data encoder through the output stage's
// level tables: for every F, S, mode and bit value, the (M,D) pair it makes
// must select the level the scheme's row or column state table gives.
module tb_fcdds_encoder;
  import tb_fcdds_ref_pkg::*;

  localparam int unsigned NCH = 6;
  // Inverse of the output-stage tables: level -> {M,D}.
  localparam logic [1:0] ROW_INV [4] = '{2'b11, 2'b00, 2'b10, 2'b01};
  localparam logic [1:0] COL_INV [4] = '{2'b01, 2'b00, 2'b10, 2'b11};

  logic f, s, ch1;
  logic [NCH-1:0] bits, m, d;
  int checks = 0, failures = 0;

  fcdds_encoder #(.NCH(NCH)) dut (.f(f), .s(s), .ch1(ch1), .bits(bits), .m(m), .d(d));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 200; it++) begin
      {ch1, f, s} = 3'(it);
      bits = NCH'($urandom);
      #1;
      for (int i = 0; i < NCH; i++) begin
        logic [1:0] exp_md;
        exp_md = ch1 ? COL_INV[col_ref(f, s, bits[i])] : ROW_INV[row_ref(f, s, bits[i])];
        checks++;
        if ({m[i], d[i]} !== exp_md) begin
          failures++;
          $display("FAIL ch1=%0d F=%0d S=%0d bit=%0d: MD=%b expected %b",
                   ch1, f, s, bits[i], {m[i], d[i]}, exp_md);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
