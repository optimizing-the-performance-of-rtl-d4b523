// tb_ddfs_sfdr - spectral purity of the synthesizer at its default sizes.
//
// For each of two coherent tones (FCW = 2^20 and 3*2^20, i.e. 1 and 3 output
// periods in 4096 clocks) the testbench records 4096 consecutive signed DAC
// words, takes their discrete Fourier transform and measures the
// spurious-free dynamic range: the fundamental's magnitude over the largest
// other bin (DC excluded), in dBc. The design target is 84 dBc; the
// measured value must not be lower. The maximum time-domain error against
// the ideal sine is reported as well.
module tb_ddfs_sfdr;
  import tb_ddfs_ref_pkg::*;
  int checks = 0, failures = 0;

  localparam int NS = 4096;

  logic        clk = 1'b0;
  logic        rst_n;
  logic [31:0] fcw;
  logic        dac_sign;
  logic [11:0] dac_mag;
  always #5 clk = ~clk;

  ddfs_top dut (.clk(clk), .rst_n(rst_n), .fcw(fcw), .dac_sign(dac_sign), .dac_mag(dac_mag));

  initial begin : watchdog
    repeat (50_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real samples [NS];
  real cos_tab [NS];
  real sin_tab [NS];

  function automatic real sfdr_db(input int fund_bin);
    real re, im, mag, fund, spur;
    fund = 0.0; spur = 0.0;
    for (int k = 1; k < NS / 2; k++) begin
      re = 0.0; im = 0.0;
      for (int n = 0; n < NS; n++) begin
        re += samples[n] * cos_tab[(k * n) % NS];
        im -= samples[n] * sin_tab[(k * n) % NS];
      end
      mag = $sqrt(re * re + im * im);
      if (k == fund_bin) fund = mag;
      else if (mag > spur) spur = mag;
    end
    return 20.0 * $log10(fund / spur);
  endfunction

  task automatic measure(input int periods);
    real s;
    #1 fcw = 32'(periods) << 20;
    repeat (8) @(posedge clk);          // let the new word reach the DAC
    for (int n = 0; n < NS; n++) begin
      @(posedge clk);
      #1;
      samples[n] = dac_sign ? -real'(dac_mag) : real'(dac_mag);
    end
    s = sfdr_db(periods);
    checks++;
    if (s < 84.0) begin
      failures++;
      $display("FAIL SFDR %f dBc below 84 dBc", s);
    end
    $display("FCW = %0d * 2^20: SFDR %0.2f dBc", periods, s);
  endtask

  initial begin
    for (int n = 0; n < NS; n++) begin
      cos_tab[n] = $cos(2.0 * PI * real'(n) / real'(NS));
      sin_tab[n] = $sin(2.0 * PI * real'(n) / real'(NS));
    end
    rst_n = 1'b0;
    fcw   = 32'd0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    measure(1);
    measure(3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
