// tb_segment_coef_mux - checks every segment's slope, intercept and shifted
// offset against the reference table, for every offset x.
module tb_segment_coef_mux;
  import tb_ddfs_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [3:0]  seg;
  logic [7:0]  x, x_shift;
  logic [9:0]  m;
  logic [11:0] c;

  segment_coef_mux dut (.seg(seg), .x(x), .m(m), .c(c), .x_shift(x_shift));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 16; s++)
      for (int i = 0; i < 256; i++) begin
        seg = 4'(s); x = 8'(i);
        #1;
        checks++;
        if (int'(m) != REF_M[s] || int'(c) != REF_C[s] || int'(x_shift) != (i >> REF_K[s])) begin
          failures++;
          if (failures < 10)
            $display("FAIL seg=%0d x=%0d m=%0d c=%0d xs=%0d", s, i, m, c, x_shift);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
