// tb_ddfs_top - end-to-end test of the synthesizer.
//
// Five synthesizers run side by side from one FCW stream: the default
// (unpipelined accumulator, P = 1, unpipelined converter), accumulators cut
// into 2 and 4 stages, and converters cut into 1 and 2 stages (C).
// Every clock each DAC word is compared with the integer reference model
//     sample after clock e = sine(MSBs of FCW_1 + ... + FCW_(e-1-P-C))
// and, as a signed value, with the ideal 4095*sin within 4.1 LSB (2.5 LSB
// approximation error plus at most 1.6 LSB from mirroring the address with
// a one's complement). It counts how often each mechanism of the design was
// used and fails if one never was: phase wrap-around, each of the four
// quadrants (sign and mirror), each of the 16 segments, frequency switches,
// carries between accumulator stages, and every configuration's converter
// pipeline. The frequency-switch latency (P+C+2 clocks from an FCW change
// to the DAC word) is measured explicitly.
module tb_ddfs_top;
  import tb_ddfs_ref_pkg::*;
  int checks = 0, failures = 0;

  logic        clk = 1'b0;
  logic        rst_n;
  logic [31:0] fcw;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NC = 5;
  localparam int CFG_S [NC] = '{32, 16, 8, 32, 16};   // accumulator stage width
  localparam int CFG_C [NC] = '{ 0,  0, 0,  1,  2};   // converter stages

  int wraps = 0, fcw_switches = 0, stage_carries = 0, fill_skips = 0;
  int quadrant_hits [4];
  int segment_hits  [16];
  int latency_seen  [NC];
  real worst_err = 0.0;

  for (genvar ci = 0; ci < NC; ci++) begin : g_cfg
    localparam int P = 32 / CFG_S[ci] + CFG_C[ci];   // total extra latency
    logic        dac_sign;
    logic [11:0] dac_mag;

    if (ci == 0) begin : g_default
      ddfs_top dut (.clk(clk), .rst_n(rst_n), .fcw(fcw), .dac_sign(dac_sign), .dac_mag(dac_mag));
    end else begin : g_sized
      ddfs_top #(.PA_STAGE_W(CFG_S[ci]), .SINE_PIPE(CFG_C[ci])) dut (
        .clk(clk), .rst_n(rst_n), .fcw(fcw), .dac_sign(dac_sign), .dac_mag(dac_mag));
    end

    longint sums [64];
    int     edge_no = 0;
    always @(posedge clk) begin
      if (!rst_n) begin
        for (int k = 0; k < 64; k++) sums[k] = 0;
        edge_no = 0;
      end else begin
        longint nxt, ph;
        int     phase14, exp_sign, exp_mag;
        real    err;
        edge_no++;
        nxt = (sums[(edge_no - 1) & 63] + longint'(fcw)) & 64'hffff_ffff;
        if (ci == 0 && nxt < sums[(edge_no - 1) & 63]) wraps++;
        if (ci == 0 && ((sums[(edge_no - 1) & 63] & 64'hffff) + (longint'(fcw) & 64'hffff)) > 64'hffff)
          stage_carries++;
        sums[edge_no & 63] = nxt;
        ph       = (edge_no - 1 - P) <= 0 ? 0 : sums[(edge_no - 1 - P) & 63];
        phase14  = int'(ph >> 18);
        exp_sign = sign_ref(phase14);
        exp_mag  = mag_ref(phase14);
        #1;
        // Converter pipeline registers leave reset as zero rather than as
        // the sine of phase 0, so skip the clocks they are still filling.
        if (CFG_C[ci] > 0 && edge_no <= P + 1) begin
          fill_skips++;
        end else begin
          checks++;
          if (int'(dac_sign) != exp_sign || int'(dac_mag) != exp_mag) begin
            failures++;
            if (failures < 10)
              $display("FAIL cfg %0d clock %0d: %b/%0d expected %0d/%0d",
                       ci, edge_no, dac_sign, dac_mag, exp_sign, exp_mag);
          end
          err = (dac_sign ? -real'(dac_mag) : real'(dac_mag)) - ideal_sample(phase14);
          if (err < 0.0) err = -err;
          checks++;
          if (err > 4.1) begin
            failures++;
            if (failures < 10) $display("FAIL cfg %0d clock %0d: error %f LSB", ci, edge_no, err);
          end
          if (ci == 0) begin
            if (err > worst_err) worst_err = err;
            quadrant_hits[phase14 >> 12]++;
            segment_hits[addr_ref(phase14) >> 8]++;
          end
        end
      end
    end
  end

  // Frequency switch: from a held phase, step FCW and count clocks until
  // each DAC word moves.
  task automatic latency_probe();
    logic [12:0] w0 [NC];
    logic [12:0] w  [NC];
    int          first [NC];
    for (int ci = 0; ci < NC; ci++) first[ci] = -1;
    #1 fcw = 32'd0;
    repeat (20) @(posedge clk);
    #1 fcw = 32'h4000_0000;     // quarter period per clock
    fcw_switches++;
    for (int t = 1; t <= 20; t++) begin
      @(posedge clk);
      #2;
      w[0] = {g_cfg[0].dac_sign, g_cfg[0].dac_mag};
      w[1] = {g_cfg[1].dac_sign, g_cfg[1].dac_mag};
      w[2] = {g_cfg[2].dac_sign, g_cfg[2].dac_mag};
      w[3] = {g_cfg[3].dac_sign, g_cfg[3].dac_mag};
      w[4] = {g_cfg[4].dac_sign, g_cfg[4].dac_mag};
      for (int ci = 0; ci < NC; ci++) begin
        if (t == 1) w0[ci] = w[ci];
        if (first[ci] < 0 && w[ci] != w0[ci]) first[ci] = t;
      end
    end
    for (int ci = 0; ci < NC; ci++) begin
      latency_seen[ci] = first[ci];
      checks++;
      if (first[ci] != 32 / CFG_S[ci] + CFG_C[ci] + 2) begin
        failures++;
        $display("FAIL cfg %0d switching latency %0d, expected %0d",
                 ci, first[ci], 32 / CFG_S[ci] + CFG_C[ci] + 2);
      end
    end
  endtask

  task automatic require(input string what, input int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    for (int q = 0; q < 4; q++) quadrant_hits[q] = 0;
    for (int s = 0; s < 16; s++) segment_hits[s] = 0;
    rst_n = 1'b0;
    fcw   = 32'd0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    latency_probe();
    // A slow tone (one period in 4096 clocks): visits every segment.
    #1 fcw = 32'h0010_0000; fcw_switches++;
    repeat (4200) @(posedge clk);
    // Frequency hopping between random words.
    for (int hop = 0; hop < 60; hop++) begin
      #1 fcw = $urandom(); fcw_switches++;
      repeat ($urandom_range(2, 100)) @(posedge clk);
    end
    // Near the top of the band and the finest resolution.
    #1 fcw = 32'h3fff_ffff; fcw_switches++;
    repeat (500) @(posedge clk);
    #1 fcw = 32'd1; fcw_switches++;
    repeat (50) @(posedge clk);
    #1;
    require("phase wrap-around", wraps);
    require("frequency switch", fcw_switches);
    require("carry between accumulator stages", stage_carries);
    for (int q = 0; q < 4; q++) require($sformatf("quadrant %0d", q), quadrant_hits[q]);
    for (int s = 0; s < 16; s++) require($sformatf("segment %0d", s), segment_hits[s]);
    $display("converter pipeline fill clocks skipped=%0d", fill_skips);
    $display("wraps=%0d switches=%0d stage carries=%0d quadrants=%0d/%0d/%0d/%0d worst error %f LSB",
             wraps, fcw_switches, stage_carries, quadrant_hits[0], quadrant_hits[1],
             quadrant_hits[2], quadrant_hits[3], worst_err);
    for (int ci = 0; ci < NC; ci++)
      $display("accumulator stages %0d, converter stages %0d: FCW-to-DAC latency %0d clocks",
               32 / CFG_S[ci], CFG_C[ci], latency_seen[ci]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
