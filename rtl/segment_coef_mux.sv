// segment_coef_mux - the coefficient "ROM" of the parabolic sine converter,
// built as three hard-wired 16-to-1 multiplexers sharing one 4-bit select.
//
// For the segment number seg it returns the corrected slope m (10 bits) and
// intercept c (12 bits) from ddfs_pkg, and the offset x shifted right by that
// segment's k. Each data input of the multiplexers is a constant (or, for the
// shift, x wired with a fixed shift), so no real memory is needed: 160 bits
// of m, 192 bits of c and 48 bits of k, 400 bits in all. Purely
// combinational.
module segment_coef_mux
  import ddfs_pkg::*;
(
  input  logic [SEG_W-1:0] seg,       // quarter-wave segment 0..15
  input  logic [X_W-1:0]   x,         // offset inside the segment
  output m_coef_t          m,         // m_i*
  output c_coef_t          c,         // c_i*
  output logic [X_W-1:0]   x_shift    // x >> k_i
);
  always_comb begin
    m       = '0;
    c       = '0;
    x_shift = '0;
    for (int i = 0; i < int'(SEGMENTS); i++) begin
      if (seg == SEG_W'(i)) begin
        m       = M_TABLE[i];
        c       = C_TABLE[i];
        x_shift = x >> K_TABLE[i];
      end
    end
  end
endmodule
