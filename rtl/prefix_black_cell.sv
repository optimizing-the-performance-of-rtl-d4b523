// prefix_black_cell - the associative operator ("black circle") of a
// parallel-prefix adder. It merges the (generate, propagate) pair of a high
// bit group with that of the adjacent lower group:
//     G = G_hi | (P_hi & G_lo),   P = P_hi & P_lo.
// Purely combinational. In a full-custom design the G half is the single
// complex gate whose transistor-level styles are studied for low power;
// here it is plain logic.
module prefix_black_cell (
  input  logic g_hi,
  input  logic p_hi,
  input  logic g_lo,
  input  logic p_lo,
  output logic g_out,
  output logic p_out
);
  assign g_out = g_hi | (p_hi & g_lo);
  assign p_out = p_hi & p_lo;
endmodule
