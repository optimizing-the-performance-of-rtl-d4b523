// phase_accumulator - N-bit variable-increment counter of the synthesizer,
// optionally cut into parallel pipeline stages.
//
// Every clock the phase grows by the frequency control word FCW and wraps
// modulo 2^N, so the upper phase bits sweep one sine period every
// 2^N / FCW clocks. Only the upper OUT_W phase bits leave the block.
//
// The accumulator is split into P = N / STAGE_W stages of STAGE_W bits
// (P = 1, the default, is the plain non-pipelined accumulator, the lowest
// power choice; STAGE_W = N/2 is the recommended speed/power compromise).
// Stage j (j = 0 the least significant) holds STAGE_W sum bits and one carry
// flip-flop. It adds its slice of FCW and the carry stored by stage j-1 one
// clock earlier with a han_carlson_adder. Because a carry reaches stage j
// j clocks late, the FCW slice of stage j is delayed j extra clocks (input
// skew registers, j+1 registers including the common FCW input register),
// and the outputs of the lower stages are delayed P-1-j clocks by end
// registers so that all OUT_W phase bits leave together. Stages entirely
// below the output bits need no end registers.
//
// Timing: FCW is registered on input. The phase seen at phase_out in cycle t
// includes every FCW sampled up to cycle t-1-P (latency P+1 clocks from an
// FCW change to the first phase step using it; P = 1 gives the two register
// banks of a plain accumulator). Synchronous active-low reset clears every
// register, so the pipeline starts from phase 0 and is consistent at once.
// The split into stages, the skew and end registers follow the published
// pipelined accumulator; the reset and the choice of P = 1 as default are
// this design's own.
module phase_accumulator #(
  parameter int unsigned N       = 32,   // phase precision
  parameter int unsigned STAGE_W = 32,   // bits per pipeline stage (n)
  parameter int unsigned OUT_W   = 14    // phase MSBs delivered (Q)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N-1:0]     fcw,
  output logic [OUT_W-1:0] phase_out
);
  localparam int unsigned P = N / STAGE_W;

  if (N % STAGE_W != 0 || OUT_W > N || OUT_W == 0) begin : g_bad_params
    $error("phase_accumulator: STAGE_W must divide N and 0 < OUT_W <= N");
  end

  // Deskewed phase, full width; bits below N-OUT_W carry no end registers.
  logic [N-1:0] phase_aligned;

  // carry_in[j]: stored carry entering stage j (stage 0 sees 0). The top
  // stage's carry out is the phase wrap and is not stored.
  wire [P-1:0] carry_in;
  assign carry_in[0] = 1'b0;

  for (genvar j = 0; j < P; j++) begin : g_stage
    localparam int unsigned LSB = j * STAGE_W;
    localparam int unsigned MSB = LSB + STAGE_W - 1;
    // Delay of the end registers for this stage.
    localparam int unsigned END_DLY = P - 1 - j;

    // FCW skew line: j+1 registers (index 0 is the common input register).
    logic [STAGE_W-1:0] fcw_q [j+1];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int d = 0; d <= j; d++) fcw_q[d] <= '0;
      end else begin
        fcw_q[0] <= fcw[MSB:LSB];
        for (int d = 1; d <= j; d++) fcw_q[d] <= fcw_q[d-1];
      end
    end

    // Stage adder and sum register.
    logic [STAGE_W-1:0] acc_q, acc_d;
    logic               cout;
    han_carlson_adder #(.WIDTH(STAGE_W)) u_add (
      .a   (acc_q),
      .b   (fcw_q[j]),
      .cin (carry_in[j]),
      .sum (acc_d),
      .cout(cout)
    );

    always_ff @(posedge clk) begin
      if (!rst_n) acc_q <= '0;
      else        acc_q <= acc_d;
    end

    if (j + 1 < P) begin : g_carry
      logic carry_q;
      always_ff @(posedge clk) begin
        if (!rst_n) carry_q <= 1'b0;
        else        carry_q <= cout;
      end
      assign carry_in[j+1] = carry_q;
    end

    // End registers, only where the stage feeds the output bits.
    if (END_DLY > 0 && MSB >= N - OUT_W) begin : g_end
      logic [STAGE_W-1:0] end_q [END_DLY];
      always_ff @(posedge clk) begin
        if (!rst_n) begin
          for (int d = 0; d < int'(END_DLY); d++) end_q[d] <= '0;
        end else begin
          end_q[0] <= acc_q;
          for (int d = 1; d < int'(END_DLY); d++) end_q[d] <= end_q[d-1];
        end
      end
      assign phase_aligned[MSB:LSB] = end_q[END_DLY-1];
    end else begin : g_direct
      assign phase_aligned[MSB:LSB] = acc_q;
    end
  end

  assign phase_out = phase_aligned[N-1 -: OUT_W];

endmodule
