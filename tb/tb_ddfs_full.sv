// tb_ddfs_full - the synthesizer at its default sizes (32-bit unpipelined
// accumulator, 16-segment converter) through complete output periods.
//
// Two tones are generated in turn: FCW = 2^20 (f_out = f_clk/4096) for three
// periods and, after a frequency switch, FCW = 2^22 (f_out = f_clk/1024) for
// three periods. Every DAC word is compared with the integer reference model
// and with the ideal sine (4.1 LSB); the period measured between rising
// sign changes must equal 2^32 / FCW clocks. The reference model places the
// first word using a new FCW three clocks after it is applied, so the
// switching latency is checked on every clock.
module tb_ddfs_full;
  import tb_ddfs_ref_pkg::*;
  int checks = 0, failures = 0;

  logic        clk = 1'b0;
  logic        rst_n;
  logic [31:0] fcw;
  logic        dac_sign;
  logic [11:0] dac_mag;
  always #5 clk = ~clk;

  ddfs_top dut (.clk(clk), .rst_n(rst_n), .fcw(fcw), .dac_sign(dac_sign), .dac_mag(dac_mag));

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: phase sums per clock, DAC word after clock e uses sum e-2.
  longint sums [8];
  int     edge_no = 0;
  int     last_rise = -1, period = 0, rises = 0;
  logic   prev_sign = 1'b0;

  always @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < 8; k++) sums[k] = 0;
      edge_no = 0;
    end else begin
      int  phase14;
      real err;
      edge_no++;
      sums[edge_no & 7] = (sums[(edge_no - 1) & 7] + longint'(fcw)) & 64'hffff_ffff;
      phase14 = (edge_no - 2) <= 0 ? 0 : int'(sums[(edge_no - 2) & 7] >> 18);
      #1;
      checks++;
      if (int'(dac_sign) != sign_ref(phase14) || int'(dac_mag) != mag_ref(phase14)) begin
        failures++;
        if (failures < 10) $display("FAIL clock %0d: %b/%0d", edge_no, dac_sign, dac_mag);
      end
      err = (dac_sign ? -real'(dac_mag) : real'(dac_mag)) - ideal_sample(phase14);
      if (err < 0.0) err = -err;
      checks++;
      if (err > 4.1) failures++;
      // Period measurement on the sign going from negative to positive.
      if (prev_sign && !dac_sign) begin
        if (last_rise >= 0) period = edge_no - last_rise;
        last_rise = edge_no;
        rises++;
      end
      prev_sign = dac_sign;
    end
  end

  task automatic run_tone(input logic [31:0] word, input int periods);
    int expected = int'(64'h1_0000_0000 / longint'(word));
    #1 fcw = word;
    rises = 0; last_rise = -1;
    repeat (periods * expected + 8) @(posedge clk);
    #2;
    checks++;
    if (period != expected || rises < periods) begin
      failures++;
      $display("FAIL tone %h: period %0d clocks, expected %0d", word, period, expected);
    end
    $display("FCW %h: output period %0d clocks (f_out = f_clk / %0d)", word, period, period);
  endtask

  initial begin
    rst_n = 1'b0;
    fcw   = 32'd0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (5) @(posedge clk);
    run_tone(32'h0010_0000, 3);
    run_tone(32'h0040_0000, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
