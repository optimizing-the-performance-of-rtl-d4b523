// tb_parabolic_sine_approx - sweeps all 4096 quarter-wave addresses.
// Checks (1) the amplitude bit for bit against the integer reference model,
// (2) the maximum absolute error against the ideal 4095*sin(pi/2*a/4096)
// stays within the published figure of 7.6e-4 of full scale. Every segment
// is hit. The two pipelined variants are checked one and two clocks after
// each address. It reports how often the curve steps down by a few LSBs (the
// coefficient table allows this close to the peak).
module tb_parabolic_sine_approx;
  import tb_ddfs_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [11:0] addr;
  logic [11:0] amp;
  real         err, mae;
  int          prev, mae_addr, backsteps;
  int          seg_hits [16];

  logic clk = 1'b0, rst_n = 1'b0;
  parabolic_sine_approx dut (.clk(clk), .rst_n(rst_n), .addr(addr), .amp(amp));

  // Pipelined versions: amp_p1 / amp_p2 follow addr by one / two clocks.
  logic [11:0] amp_p1, amp_p2;
  parabolic_sine_approx #(.PIPE(1)) dut_p1 (.clk(clk), .rst_n(rst_n), .addr(addr), .amp(amp_p1));
  parabolic_sine_approx #(.PIPE(2)) dut_p2 (.clk(clk), .rst_n(rst_n), .addr(addr), .amp(amp_p2));
  int addr_d1 = 0, addr_d2 = 0;

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mae = 0.0; prev = 0; mae_addr = 0; backsteps = 0;
    for (int s = 0; s < 16; s++) seg_hits[s] = 0;
    addr = '0;
    #1 clk = 1'b1;
    #1 clk = 1'b0;
    rst_n = 1'b1;
    for (int a = 0; a < 4096; a++) begin
      addr = 12'(a);
      #1;
      // One clock: the pipelined copies take in this address.
      clk = 1'b1;
      #1 clk = 1'b0;
      addr_d2 = addr_d1;
      addr_d1 = a;
      #1;
      checks++;
      if (int'(amp_p1) != amp_ref(addr_d1) || (a > 0 && int'(amp_p2) != amp_ref(addr_d2))) begin
        failures++;
        if (failures < 10)
          $display("FAIL pipelined addr=%0d amp_p1=%0d amp_p2=%0d", a, amp_p1, amp_p2);
      end
      seg_hits[a >> 8]++;
      checks++;
      if (int'(amp) != amp_ref(a)) begin
        failures++;
        if (failures < 10) $display("FAIL addr=%0d amp=%0d exp=%0d", a, amp, amp_ref(a));
      end
      if (int'(amp) < prev) backsteps++;
      prev = int'(amp);
      err = real'(amp) - ideal_amp(a);
      if (err < 0.0) err = -err;
      if (err > mae) begin
        mae = err;
        mae_addr = a;
      end
    end
    checks++;
    if (mae / 4095.0 > 7.6e-4) begin
      failures++;
      $display("FAIL maximum approximation error %f LSB", mae);
    end
    $display("%0d addresses where the amplitude steps down", backsteps);
    $display("maximum approximation error %f LSB = %e of full scale at address %0d",
             mae, mae / 4095.0, mae_addr);
    for (int s = 0; s < 16; s++) begin
      checks++;
      if (seg_hits[s] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
