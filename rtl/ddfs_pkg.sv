// ddfs_pkg - constants shared by the direct digital frequency synthesizer.
//
// The synthesizer turns an N-bit frequency control word (FCW) into a
// sign-magnitude sine sample every clock: f_out = FCW * f_clk / 2^N.
// The sine is generated from a quarter wave cut into 16 equal segments;
// inside segment i the amplitude is the parabola
//     y = ((m_i - (x >> k_i)) * x + c_i * 2^9) >> 9
// where x is the 8-bit offset inside the segment. The slope m_i (10 bits),
// the intercept c_i (12 bits) and the curvature shift k_i (3 bits) of every
// segment are the coefficient tables below (400 bits in all). The table
// values and all widths here are those of the published 16-segment design;
// only the packaging into a package is this implementation's own.
package ddfs_pkg;

  // Phase accumulator precision N (32 bits is the preferred value).
  localparam int unsigned PHASE_W    = 32;
  // Phase bits used by the sine converter: 2 quadrant bits + quarter address.
  localparam int unsigned QADDR_W    = 12;              // quarter-wave address
  localparam int unsigned SINE_IN_W  = QADDR_W + 2;     // 14 phase MSBs
  // Segmentation of the quarter wave.
  localparam int unsigned SEGMENTS   = 16;
  localparam int unsigned SEG_W      = 4;               // log2(SEGMENTS)
  localparam int unsigned X_W        = QADDR_W - SEG_W; // 8-bit offset x
  // Coefficient precisions.
  localparam int unsigned M_W        = 10;
  localparam int unsigned C_W        = 12;
  localparam int unsigned K_W        = 3;
  // Multiply-accumulate: X_W x M_W + (C_W << C_SHIFT), MAC_W bits wide.
  localparam int unsigned C_SHIFT    = 9;
  localparam int unsigned MAC_W      = 21;
  // Output magnitude precision M (sign is carried separately).
  localparam int unsigned AMP_W      = 12;

  typedef logic [M_W-1:0] m_coef_t;
  typedef logic [C_W-1:0] c_coef_t;
  typedef logic [K_W-1:0] k_coef_t;

  // Corrected slope m_i*, segment 1 first.
  localparam m_coef_t M_TABLE [SEGMENTS] = '{
    10'd805, 10'd803, 10'd788, 10'd773, 10'd743, 10'd706, 10'd678, 10'd628,
    10'd572, 10'd511, 10'd445, 10'd376, 10'd303, 10'd227, 10'd150, 10'd103};

  // Corrected intercept c_i*, in output LSBs.
  localparam c_coef_t C_TABLE [SEGMENTS] = '{
    12'd1,    12'd403,  12'd800,  12'd1190, 12'd1568, 12'd1932, 12'd2276, 12'd2599,
    12'd2897, 12'd3167, 12'd3407, 12'd3613, 12'd3785, 12'd3921, 12'd4018, 12'd4074};

  // Right shift k_i applied to x for the parabolic correction term.
  localparam k_coef_t K_TABLE [SEGMENTS] = '{
    3'd7, 3'd5, 3'd5, 3'd4, 3'd4, 3'd4, 3'd3, 3'd3,
    3'd3, 3'd3, 3'd3, 3'd3, 3'd3, 3'd3, 3'd3, 3'd2};

  // One sign-magnitude output sample, as taken by a DAC with sign inversion.
  typedef struct packed {
    logic             sign;   // 1: negative half period
    logic [AMP_W-1:0] mag;    // |sin| scaled to 0 .. 2^AMP_W - 1
  } sample_t;

endpackage
