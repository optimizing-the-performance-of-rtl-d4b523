// tb_phase_accumulator - runs five accumulator configurations side by side
// on one random FCW stream and compares each cycle with an integer model:
//     phase_out after clock e = MSBs of (FCW_1 + ... + FCW_(e-P)) mod 2^N
// where FCW_i is the word sampled at clock i and P the number of pipeline
// stages. Configurations: 32 bits unpipelined (default), 32 bits in 2 and
// 4 stages, 24 bits in 2 stages and 16 bits in 16 one-bit stages. It also
// measures the latency from an FCW step to the first phase change (P+1
// clocks) and requires that every configuration wrapped around and that
// inter-stage carries were exercised.
module tb_phase_accumulator;
  int checks = 0, failures = 0;

  logic        clk = 1'b0;
  logic        rst_n;
  logic [63:0] fcw;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NC = 5;
  localparam int CFG_N [NC] = '{32, 32, 32, 24, 16};
  localparam int CFG_S [NC] = '{32, 16,  8, 12,  1};
  localparam int CFG_Q [NC] = '{14, 14, 14, 12, 12};

  int wraps [NC];
  int latency_seen [NC];

  for (genvar ci = 0; ci < NC; ci++) begin : g_cfg
    localparam int N = CFG_N[ci];
    localparam int S = CFG_S[ci];
    localparam int Q = CFG_Q[ci];
    localparam int P = N / S;
    logic [Q-1:0] phase_out;

    if (ci == 0) begin : g_default
      phase_accumulator dut (.clk(clk), .rst_n(rst_n), .fcw(fcw[N-1:0]), .phase_out(phase_out));
    end else begin : g_sized
      phase_accumulator #(.N(N), .STAGE_W(S), .OUT_W(Q)) dut (
        .clk(clk), .rst_n(rst_n), .fcw(fcw[N-1:0]), .phase_out(phase_out));
    end

    // Running sums S_k of the sampled words, kept for the last 64 clocks.
    longint sums [64];
    longint modulus = longint'(1) << N;

    int edge_no = 0;
    always @(posedge clk) begin
      if (!rst_n) begin
        for (int k = 0; k < 64; k++) sums[k] = 0;
        edge_no = 0;
      end else begin
        longint nxt;
        edge_no++;
        nxt = (sums[(edge_no - 1) & 63] + longint'(fcw[N-1:0])) % modulus;
        if (nxt < sums[(edge_no - 1) & 63]) wraps[ci]++;
        sums[edge_no & 63] = nxt;
        #1;
        checks++;
        if (longint'(phase_out) != (((edge_no - P) <= 0 ? 0 : sums[(edge_no - P) & 63]) >> (N - Q))) begin
          failures++;
          if (failures < 10)
            $display("FAIL cfg %0d edge %0d phase=%h", ci, edge_no, phase_out);
        end
      end
    end
  end

  // Latency probe: phase outputs right after the FCW step.
  task automatic run_latency_probe();
    logic [13:0] q0 [NC];
    int          first_change [NC];
    for (int ci = 0; ci < NC; ci++) first_change[ci] = -1;
    fcw = 64'd0;
    repeat (40) @(posedge clk);
    #1 fcw = '1;    // largest step: changes every configuration's MSBs
    for (int t = 1; t <= 40; t++) begin
      @(posedge clk);
      #2;
      if (t == 1) begin
        q0[0] = 14'(g_cfg[0].phase_out); q0[1] = 14'(g_cfg[1].phase_out);
        q0[2] = 14'(g_cfg[2].phase_out); q0[3] = 14'(g_cfg[3].phase_out);
        q0[4] = 14'(g_cfg[4].phase_out);
      end
      if (first_change[0] < 0 && 14'(g_cfg[0].phase_out) != q0[0]) first_change[0] = t;
      if (first_change[1] < 0 && 14'(g_cfg[1].phase_out) != q0[1]) first_change[1] = t;
      if (first_change[2] < 0 && 14'(g_cfg[2].phase_out) != q0[2]) first_change[2] = t;
      if (first_change[3] < 0 && 14'(g_cfg[3].phase_out) != q0[3]) first_change[3] = t;
      if (first_change[4] < 0 && 14'(g_cfg[4].phase_out) != q0[4]) first_change[4] = t;
    end
    for (int ci = 0; ci < NC; ci++) begin
      latency_seen[ci] = first_change[ci];
      checks++;
      if (first_change[ci] != CFG_N[ci] / CFG_S[ci] + 1) begin
        failures++;
        $display("FAIL cfg %0d latency %0d clocks, expected %0d",
                 ci, first_change[ci], CFG_N[ci] / CFG_S[ci] + 1);
      end
    end
  endtask

  initial begin
    for (int ci = 0; ci < NC; ci++) wraps[ci] = 0;
    rst_n = 1'b0;
    fcw = 64'd0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // Latency: the step is applied before edge 41; the phase first moves
    // after P+1 edges (the check counts edges from the one that samples it).
    run_latency_probe();
    // Random words, held for random lengths, including very large and
    // very small ones so that carries ripple through every stage.
    for (int blk = 0; blk < 300; blk++) begin
      case ($urandom_range(0, 3))
        0: fcw = {$urandom(), $urandom()};
        1: fcw = 64'($urandom_range(1, 255));
        2: fcw = {32'hffff_ffff, 16'hffff, 16'($urandom())};
        default: fcw = 64'($urandom()) << $urandom_range(0, 20);
      endcase
      repeat ($urandom_range(1, 40)) @(posedge clk);
      #1;
    end
    for (int ci = 0; ci < NC; ci++) begin
      checks++;
      if (wraps[ci] == 0) begin
        failures++;
        $display("FAIL cfg %0d never wrapped", ci);
      end
      $display("cfg N=%0d stage=%0d: %0d wraps, FCW-to-phase latency %0d clocks",
               CFG_N[ci], CFG_S[ci], wraps[ci], latency_seen[ci]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
