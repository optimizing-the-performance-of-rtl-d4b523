// tb_han_carlson_adder - checks the Han-Carlson adder at the widths the
// synthesizer uses (32-bit accumulator, 21-bit MAC adder, 10-bit subtractor,
// 16-bit accumulator stage) and at small widths (1, 2, 3, 5: every corner of
// the prefix network), exhaustively where small and with random and
// carry-chain corner operands otherwise.
module tb_han_carlson_adder;
  int checks = 0, failures = 0;

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One device under test per width, all driven from 64-bit stimulus.
  localparam int NW = 8;
  localparam int WIDTHS [NW] = '{32, 21, 16, 10, 5, 3, 2, 1};
  logic [63:0] a_in, b_in;
  logic        cin;
  logic [63:0] sum_out [NW];
  logic        cout_out [NW];

  for (genvar w = 0; w < NW; w++) begin : g_dut
    localparam int W = WIDTHS[w];
    logic [W-1:0] s;
    logic         co;
    if (W == 32) begin : g_default
      han_carlson_adder dut (.a(a_in[W-1:0]), .b(b_in[W-1:0]), .cin(cin), .sum(s), .cout(co));
    end else begin : g_sized
      han_carlson_adder #(.WIDTH(W)) dut (.a(a_in[W-1:0]), .b(b_in[W-1:0]), .cin(cin), .sum(s), .cout(co));
    end
    assign sum_out[w]  = 64'(s);
    assign cout_out[w] = co;
  end

  task automatic check_all();
    #1;
    for (int w = 0; w < NW; w++) begin
      logic [64:0] mask = (65'd1 << WIDTHS[w]) - 65'd1;
      logic [64:0] exp_v = (65'(a_in) & mask) + (65'(b_in) & mask) + 65'(cin);
      logic [64:0] got = {64'd0, cout_out[w]} << WIDTHS[w] | 65'(sum_out[w]);
      checks++;
      if (got != (exp_v & ((mask << 1) | 65'd1))) begin
        failures++;
        if (failures < 10)
          $display("FAIL w=%0d a=%h b=%h cin=%b got=%h exp=%h",
                   WIDTHS[w], a_in & 64'(mask), b_in & 64'(mask), cin, got, exp_v);
      end
    end
  endtask

  initial begin
    // Exhaustive over 5 bits (covers widths 1..5 completely).
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++)
        for (int c = 0; c < 2; c++) begin
          a_in = 64'(i); b_in = 64'(j); cin = c[0];
          check_all();
        end
    // Carry-chain corners: all-ones plus one, alternating patterns.
    a_in = '1; b_in = 64'd0; cin = 1'b1; check_all();
    a_in = '1; b_in = 64'd1; cin = 1'b0; check_all();
    a_in = {32{2'b10}}; b_in = {32{2'b01}}; cin = 1'b1; check_all();
    a_in = '1; b_in = '1; cin = 1'b1; check_all();
    // Single propagate chains broken at every position.
    for (int p = 0; p < 32; p++) begin
      a_in = ~(64'd1 << p); b_in = 64'd1; cin = 1'b0; check_all();
      a_in = 64'd1 << p; b_in = '1; cin = 1'b1; check_all();
    end
    // Random operands.
    for (int n = 0; n < 20000; n++) begin
      a_in = {$urandom(), $urandom()};
      b_in = {$urandom(), $urandom()};
      cin  = 1'($urandom());
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
