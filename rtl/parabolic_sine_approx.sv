// parabolic_sine_approx - quarter-wave phase-to-amplitude converter using a
// 16-segment parabolic approximation of sin(pi/2 * addr / 4096).
//
// The 12-bit quarter-wave address is split into a 4-bit segment number i
// (upper bits) and an 8-bit offset x inside the segment. Within segment i the
// amplitude is
//     y = (m_i - x / 2^k_i) * x + c_i        (x / 2^k_i truncated)
// i.e. a straight line m_i x + c_i corrected by the parabola -x^2 / 2^k_i,
// with coefficients from the published 16-segment table (ddfs_pkg).
// Datapath:
//   * segment_coef_mux supplies m_i, c_i and x >> k_i;
//   * a 10-bit Han-Carlson subtractor (inverted operand, carry-in 1) forms
//     d = m_i - (x >> k_i), which never goes negative for this table;
//   * wallace_mac forms d * x + c_i * 2^9 as a 21-bit number (m is scaled by
//     2^9, so c is padded with nine zero bits);
//   * the upper 12 bits are the amplitude, 0..4095.
// Maximum error against the ideal 4095*sin is 2.47 LSB (6.0e-4 of full
// scale).
//
// Timing: PIPE = 0 (default) is purely combinational and the caller
// registers the result; clk and rst_n are then unused. The converter has no
// feedback, so it can be cut into stages for a faster clock: PIPE >= 1
// registers the carry-save rows inside the MAC, PIPE = 2 also registers x,
// the slope and the intercept after the subtractor. amp then follows addr
// by PIPE clocks. Where to place the cuts is this design's own choice.
module parabolic_sine_approx
  import ddfs_pkg::*;
#(
  parameter int unsigned PIPE = 0     // 0, 1 or 2 internal register stages
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [QADDR_W-1:0] addr,
  output logic [AMP_W-1:0]   amp
);
  logic [SEG_W-1:0] seg;
  logic [X_W-1:0]   x, x_shift;
  m_coef_t          m;
  c_coef_t          c;
  logic [M_W-1:0]   slope;
  logic             sub_cout_unused;
  logic [MAC_W-1:0] mac;

  assign seg = addr[QADDR_W-1 -: SEG_W];
  assign x   = addr[X_W-1:0];

  segment_coef_mux u_coef (
    .seg    (seg),
    .x      (x),
    .m      (m),
    .c      (c),
    .x_shift(x_shift)
  );

  // slope = m - (x >> k): add the inverted operand with a carry-in of one.
  han_carlson_adder #(.WIDTH(M_W)) u_sub (
    .a   (m),
    .b   (~M_W'(x_shift)),
    .cin (1'b1),
    .sum (slope),
    .cout(sub_cout_unused)
  );

  if (PIPE > 2) begin : g_bad_params
    $error("parabolic_sine_approx: PIPE must be 0, 1 or 2");
  end

  // Optional register between the subtractor and the MAC.
  logic [X_W-1:0] mac_x;
  logic [M_W-1:0] mac_slope;
  c_coef_t        mac_c;
  if (PIPE >= 2) begin : g_sub_reg
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        mac_x     <= '0;
        mac_slope <= '0;
        mac_c     <= '0;
      end else begin
        mac_x     <= x;
        mac_slope <= slope;
        mac_c     <= c;
      end
    end
  end else begin : g_sub_comb
    assign mac_x     = x;
    assign mac_slope = slope;
    assign mac_c     = c;
  end

  wallace_mac #(
    .A_W    (X_W),
    .B_W    (M_W),
    .C_W    (C_W),
    .C_SHIFT(C_SHIFT),
    .OUT_W  (MAC_W),
    .REG_CS (PIPE >= 1)
  ) u_mac (
    .clk  (clk),
    .rst_n(rst_n),
    .a    (mac_x),
    .b    (mac_slope),
    .c    (mac_c),
    .y    (mac)
  );

  assign amp = mac[MAC_W-1 -: AMP_W];
endmodule
