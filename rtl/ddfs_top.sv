// ddfs_top - direct digital frequency synthesizer with a 16-segment
// parabolic phase-to-sine converter.
//
// A frequency control word FCW gives an output sine of frequency
//     f_out = FCW * f_clk / 2^N            (N = 32 phase bits).
// Datapath, one sample per clock:
//   phase_accumulator   N-bit accumulator (optionally pipelined), its 14
//                       most significant bits go on;
//   quarter_wave_fold   top bit -> sign, next bit mirrors the remaining
//                       12 bits into a quarter-wave address;
//   parabolic_sine_approx
//                       12-bit quarter-wave amplitude from the segment
//                       coefficients, a subtractor and a Wallace-tree MAC;
//   output register     sign and 12-bit magnitude for a 12-bit DAC with
//                       built-in sign inversion (DAC and reconstruction
//                       filter are analog and outside this design).
//
// Timing: with P = N / PA_STAGE_W accumulator stages and SINE_PIPE
// converter stages, an FCW presented in cycle t first changes the phase
// step after P+1 clocks and reaches the DAC outputs SINE_PIPE+1 clocks later
// (P+SINE_PIPE+2 clocks; 3 for the defaults P = 1, SINE_PIPE = 0). The
// sign bit is delayed alongside the converter. Synchronous active-low reset
// starts the phase at 0 and clears every register. By default the sine
// converter sits unpipelined between two registers, which suits the
// low-clock, low-power target; SINE_PIPE = 1 or 2 cuts it for a faster
// clock. The output register, the reset, the pipeline cut points and the
// absence of a handshake are this design's own choices.
module ddfs_top
  import ddfs_pkg::*;
#(
  parameter int unsigned N          = PHASE_W,
  parameter int unsigned PA_STAGE_W = PHASE_W,
  parameter int unsigned SINE_PIPE  = 0         // converter stages, 0..2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N-1:0]     fcw,        // frequency control word
  output logic             dac_sign,   // 1: negative sample
  output logic [AMP_W-1:0] dac_mag     // sample magnitude 0..4095
);
  logic [SINE_IN_W-1:0] phase;
  logic [QADDR_W-1:0]   qaddr;
  logic                 sign;
  logic [AMP_W-1:0]     amp;
  sample_t              sample_q;

  phase_accumulator #(
    .N      (N),
    .STAGE_W(PA_STAGE_W),
    .OUT_W  (SINE_IN_W)
  ) u_pa (
    .clk      (clk),
    .rst_n    (rst_n),
    .fcw      (fcw),
    .phase_out(phase)
  );

  quarter_wave_fold #(.ADDR_W(QADDR_W)) u_fold (
    .phase(phase),
    .addr (qaddr),
    .sign (sign)
  );

  parabolic_sine_approx #(.PIPE(SINE_PIPE)) u_sine (
    .clk  (clk),
    .rst_n(rst_n),
    .addr (qaddr),
    .amp  (amp)
  );

  // Sign travels with the converter's pipeline.
  logic sign_aligned;
  if (SINE_PIPE > 0) begin : g_sign_dly
    logic [SINE_PIPE-1:0] sign_q;
    always_ff @(posedge clk) begin
      if (!rst_n) sign_q <= '0;
      else        sign_q <= SINE_PIPE'({sign_q, sign});
    end
    assign sign_aligned = sign_q[SINE_PIPE-1];
  end else begin : g_sign_now
    assign sign_aligned = sign;
  end

  // M-bit register in front of the DAC.
  always_ff @(posedge clk) begin
    if (!rst_n) sample_q <= '0;
    else        sample_q <= '{sign: sign_aligned, mag: amp};
  end

  assign dac_sign = sample_q.sign;
  assign dac_mag  = sample_q.mag;
endmodule
