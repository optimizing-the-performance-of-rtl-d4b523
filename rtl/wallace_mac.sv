// wallace_mac - multiply-accumulate  y = a * b + (c << C_SHIFT)  (mod 2^OUT_W)
// built as a Wallace tree of 3|2 counters and one carry-propagate adder.
//
// Default sizes are those of the sine converter: an 8-bit offset x times a
// 10-bit corrected slope plus a 12-bit intercept that enters nine places up
// (padded with zeros at the low end), giving a 21-bit result.
//
// How it works:
//   * the A_W x B_W partial-product bits a_i & b_j are placed in the column
//     of weight i+j, and the bits of c in columns C_SHIFT.. ; the multiplicand
//     therefore costs one AND delay and c adds only one more bit per column;
//   * every reduction layer takes each column three bits at a time into a
//     counter_3_2 (sum stays in the column, carry goes one column up); two
//     leftover bits go into a counter_2_2, one leftover bit passes through;
//   * layers are added until no column holds more than two bits (four layers
//     for the default sizes), leaving the result in carry-save form;
//   * a han_carlson_adder of OUT_W bits merges the two remaining rows.
// Carries out of the top column are dropped, so the result is modulo
// 2^OUT_W. The bit schedule is worked out at elaboration time by constant
// functions, so the tree adapts to any operand sizes.
//
// Timing: with REG_CS = 0 (default) the block is purely combinational and
// clk/rst_n are unused. With REG_CS = 1 the two carry-save rows are
// registered ahead of the final adder, a pipeline cut that splits the MAC
// into the counter tree and the carry-propagate adder; y then follows the
// operands by one clock. The register has a synchronous active-low reset.
// Only the upper bits of y are used by the sine converter; the unused sum
// gates of the low bits are left for synthesis to remove.
module wallace_mac #(
  parameter int unsigned A_W     = 8,
  parameter int unsigned B_W     = 10,
  parameter int unsigned C_W     = 12,
  parameter int unsigned C_SHIFT = 9,
  parameter int unsigned OUT_W   = 21,
  parameter bit          REG_CS  = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [A_W-1:0]   a,
  input  logic [B_W-1:0]   b,
  input  logic [C_W-1:0]   c,
  output logic [OUT_W-1:0] y
);
  localparam int unsigned MAXH = ((A_W < B_W) ? A_W : B_W) + 2;
  localparam int unsigned MAXL = 16;

  // Number of partial-product bits of weight col.
  function automatic int pp_count(input int col);
    int n = 0;
    for (int i = 0; i < int'(A_W); i++)
      if (col - i >= 0 && col - i < int'(B_W)) n++;
    return n;
  endfunction

  // Position inside column col of the partial product a_i & b_(col-i).
  function automatic int pp_pos(input int i, input int col);
    int n = 0;
    for (int k = 0; k < i; k++)
      if (col - k >= 0 && col - k < int'(B_W)) n++;
    return n;
  endfunction

  function automatic int init_height(input int col);
    return pp_count(col) +
           ((col >= int'(C_SHIFT) && col < int'(C_SHIFT + C_W)) ? 1 : 0);
  endfunction

  // Bits a column of height h keeps after a layer, and carries it sends up.
  function automatic int kept(input int h);
    return h / 3 + ((h % 3 == 2) ? 1 : 0) + ((h % 3 == 1) ? 1 : 0);
  endfunction
  function automatic int sent(input int h);
    return h / 3 + ((h % 3 == 2) ? 1 : 0);
  endfunction

  // Column heights before layer lyr (layer 0 = partial products).
  function automatic int height(input int lyr, input int col);
    int h  [OUT_W];
    int hn [OUT_W];
    int mx;
    for (int k = 0; k < int'(OUT_W); k++) h[k] = init_height(k);
    for (int l = 0; l < lyr; l++) begin
      mx = 0;
      for (int k = 0; k < int'(OUT_W); k++) if (h[k] > mx) mx = h[k];
      if (mx > 2) begin
        for (int k = 0; k < int'(OUT_W); k++)
          hn[k] = kept(h[k]) + ((k > 0) ? sent(h[k-1]) : 0);
        h = hn;
      end
    end
    for (int k = 0; k < int'(OUT_W); k++) if (k == col) return h[k];
    return 0;
  endfunction

  function automatic int max_height(input int lyr);
    int mx = 0;
    for (int k = 0; k < int'(OUT_W); k++)
      if (height(lyr, k) > mx) mx = height(lyr, k);
    return mx;
  endfunction

  function automatic int num_layers();
    for (int l = 0; l < int'(MAXL); l++)
      if (max_height(l) <= 2) return l;
    return MAXL;
  endfunction

  localparam int unsigned LAYERS = num_layers();

  // g_stage[l].bits[k]: the bits of column k entering layer l. One array per
  // layer keeps the layers apart as separate signals.
  for (genvar l = 0; l <= LAYERS; l++) begin : g_stage
    wire [MAXH-1:0] bits [OUT_W];
  end

  // Layer 0: partial products and the accumulate operand.
  for (genvar k = 0; k < OUT_W; k++) begin : g_init
    for (genvar i = 0; i < A_W; i++) begin : g_pp
      if (k - i >= 0 && k - i < B_W) begin : g_and
        assign g_stage[0].bits[k][pp_pos(i, k)] = a[i] & b[k-i];
      end
    end
    if (k >= C_SHIFT && k < C_SHIFT + C_W) begin : g_acc
      assign g_stage[0].bits[k][pp_count(k)] = c[k-C_SHIFT];
    end
    for (genvar e = init_height(k); e < MAXH; e++) begin : g_zero
      assign g_stage[0].bits[k][e] = 1'b0;
    end
  end

  // Reduction layers.
  for (genvar l = 0; l < LAYERS; l++) begin : g_layer
    for (genvar k = 0; k < OUT_W; k++) begin : g_col
      localparam int H     = height(l, k);
      localparam int NFA   = H / 3;
      localparam int NHA   = (H % 3 == 2) ? 1 : 0;
      localparam int NPASS = (H % 3 == 1) ? 1 : 0;
      localparam int HNEXT = height(l + 1, k);
      // Where this column's carries land in column k+1 of the next layer.
      localparam int CBASE = (k + 1 < OUT_W) ? kept(height(l, k + 1)) : 0;
      for (genvar f = 0; f < NFA; f++) begin : g_fa
        wire carry;
        counter_3_2 u_fa (
          .a   (g_stage[l].bits[k][3*f]),
          .b   (g_stage[l].bits[k][3*f+1]),
          .c   (g_stage[l].bits[k][3*f+2]),
          .s   (g_stage[l+1].bits[k][f]),
          .cout(carry)
        );
        if (k + 1 < OUT_W) begin : g_up
          assign g_stage[l+1].bits[k+1][CBASE+f] = carry;
        end
      end
      if (NHA == 1) begin : g_ha
        wire carry;
        counter_2_2 u_ha (
          .a   (g_stage[l].bits[k][3*NFA]),
          .b   (g_stage[l].bits[k][3*NFA+1]),
          .s   (g_stage[l+1].bits[k][NFA]),
          .cout(carry)
        );
        if (k + 1 < OUT_W) begin : g_up
          assign g_stage[l+1].bits[k+1][CBASE+NFA] = carry;
        end
      end
      if (NPASS == 1) begin : g_pass
        assign g_stage[l+1].bits[k][NFA] = g_stage[l].bits[k][3*NFA];
      end
      for (genvar e = HNEXT; e < MAXH; e++) begin : g_zero
        assign g_stage[l+1].bits[k][e] = 1'b0;
      end
    end
  end

  // Carry-save result: two rows, merged by the carry-propagate adder.
  logic [OUT_W-1:0] row0, row1;
  for (genvar k = 0; k < OUT_W; k++) begin : g_rows
    assign row0[k] = g_stage[LAYERS].bits[k][0];
    assign row1[k] = g_stage[LAYERS].bits[k][1];
  end

  // Optional pipeline register on the carry-save rows.
  logic [OUT_W-1:0] cpa_a, cpa_b;
  if (REG_CS) begin : g_cs_reg
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        cpa_a <= '0;
        cpa_b <= '0;
      end else begin
        cpa_a <= row0;
        cpa_b <= row1;
      end
    end
  end else begin : g_cs_comb
    assign cpa_a = row0;
    assign cpa_b = row1;
  end

  logic cout_unused;
  han_carlson_adder #(.WIDTH(OUT_W)) u_cpa (
    .a   (cpa_a),
    .b   (cpa_b),
    .cin (1'b0),
    .sum (y),
    .cout(cout_unused)
  );

endmodule
