// tb_quarter_wave_fold - checks sign and mirrored quarter-wave address for
// every 14-bit phase, and that each of the four quadrants was visited.
module tb_quarter_wave_fold;
  import tb_ddfs_ref_pkg::*;
  int checks = 0, failures = 0;
  int quadrant_hits [4] = '{0, 0, 0, 0};

  logic [13:0] phase;
  logic [11:0] addr;
  logic        sign;

  quarter_wave_fold dut (.phase(phase), .addr(addr), .sign(sign));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 16384; p++) begin
      phase = 14'(p);
      #1;
      checks++;
      quadrant_hits[p >> 12]++;
      if (int'(addr) != addr_ref(p) || int'(sign) != sign_ref(p)) begin
        failures++;
        if (failures < 10) $display("FAIL phase=%0d addr=%0d sign=%b", p, addr, sign);
      end
    end
    for (int q = 0; q < 4; q++) begin
      checks++;
      if (quadrant_hits[q] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
