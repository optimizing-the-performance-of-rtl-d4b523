// han_carlson_adder - WIDTH-bit parallel-prefix adder with a Han-Carlson
// prefix network.
//
// The carry of every bit is computed by a tree of black cells
// (prefix_black_cell) instead of a ripple chain:
//   * a top layer forms g_j = a_j & b_j and p_j = a_j ^ b_j; the carry input
//     is folded into bit 0 (g_0 |= p_0 & cin), so bit 0's group always ends
//     at the carry input;
//   * row 1 combines every odd bit with the even bit below it;
//   * rows 2 .. ceil(log2 WIDTH) run a Kogge-Stone network over the odd
//     bits only (span 2, 4, 8, ...), so each odd bit ends with the group
//     generate of all bits below and including it;
//   * a last row gives each even bit its group generate from the odd bit
//     just below it;
//   * the sum layer forms s_j = p_j ^ G_{j-1} (s_0 = p_0 ^ cin).
// This is the compromise between the Kogge-Stone and Brent-Kung networks:
// fan-in and fan-out stay bounded by 2 with log2(WIDTH)+1 black rows. For
// WIDTH = 16 it uses 32 black cells in 5 rows (7 layers with the top and sum
// layers). Purely combinational.
//
// Ports: a, b (WIDTH bits), cin -> sum (WIDTH bits), cout.
module han_carlson_adder #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned KS_ROWS = (WIDTH > 1) ? $clog2(WIDTH) : 1;
  localparam int unsigned LEVELS  = KS_ROWS + 2;   // top, rows 1..KS_ROWS, last row

  // g[l][j], p[l][j]: group generate/propagate of bit j after level l.
  wire [WIDTH-1:0] g [LEVELS];
  wire [WIDTH-1:0] p [LEVELS];
  wire [WIDTH-1:0] p_bit = a ^ b;

  // Top layer, with the carry input merged into bit 0.
  assign g[0] = (a & b) | {{(WIDTH-1){1'b0}}, p_bit[0] & cin};
  assign p[0] = p_bit;

  for (genvar lvl = 1; lvl < LEVELS; lvl++) begin : g_level
    for (genvar j = 0; j < WIDTH; j++) begin : g_bit
      // Distance to the partner bit at this level (0: buffer only).
      localparam int DIST =
          (lvl == 1)          ? ((j % 2 == 1) ? 1 : 0) :
          (lvl == LEVELS - 1) ? ((j % 2 == 0 && j > 0) ? 1 : 0) :
          ((j % 2 == 1 && j >= (1 << (lvl - 1))) ? (1 << (lvl - 1)) : 0);
      if (DIST > 0) begin : g_black
        prefix_black_cell u_cell (
          .g_hi (g[lvl-1][j]),
          .p_hi (p[lvl-1][j]),
          .g_lo (g[lvl-1][j-DIST]),
          .p_lo (p[lvl-1][j-DIST]),
          .g_out(g[lvl][j]),
          .p_out(p[lvl][j])
        );
      end else begin : g_white
        assign g[lvl][j] = g[lvl-1][j];
        assign p[lvl][j] = p[lvl-1][j];
      end
    end
  end

  // Sum layer: carry into bit j is the group generate of bits j-1 .. 0.
  wire [WIDTH-1:0] carry_in;
  if (WIDTH > 1) begin : g_carry_wide
    assign carry_in = {g[LEVELS-1][WIDTH-2:0], cin};
  end else begin : g_carry_one
    assign carry_in = cin;
  end
  assign sum  = p_bit ^ carry_in;
  assign cout = g[LEVELS-1][WIDTH-1];

endmodule
