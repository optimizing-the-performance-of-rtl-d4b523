// tb_wallace_mac - checks the Wallace-tree multiply-accumulate against
// integer arithmetic: y = (a * b + c * 2^C_SHIFT) mod 2^OUT_W. The default
// 8x10+12 configuration is run over every a with random and extreme b and c;
// a second, odd-sized configuration (5x7+6, shift 3, 14 bits) is run
// exhaustively over a and b to exercise a different tree shape. The
// default configuration with registered carry-save rows is checked one
// clock after its operands.
module tb_wallace_mac;
  int checks = 0, failures = 0;

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Default configuration.
  logic [7:0]  a;
  logic [9:0]  b;
  logic [11:0] c;
  logic [20:0] y;
  logic clk = 1'b0, rst_n = 1'b1;
  wallace_mac dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .c(c), .y(y));

  // Same MAC with the carry-save rows registered: y_reg lags by one clock.
  logic [20:0] y_reg;
  wallace_mac #(.REG_CS(1'b1)) dut_reg (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .c(c), .y(y_reg));

  // Second configuration.
  logic [4:0]  a2;
  logic [6:0]  b2;
  logic [5:0]  c2;
  logic [13:0] y2;
  wallace_mac #(.A_W(5), .B_W(7), .C_W(6), .C_SHIFT(3), .OUT_W(14)) dut2 (
    .clk(clk), .rst_n(rst_n), .a(a2), .b(b2), .c(c2), .y(y2));

  // Each check: settle, compare the combinational result, clock once and
  // compare the registered version with the same expected value.
  task automatic check1();
    longint exp_v;
    #1;
    exp_v = (longint'(a) * longint'(b) + (longint'(c) << 9)) % (64'd1 << 21);
    checks++;
    if (longint'(y) != exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL a=%0d b=%0d c=%0d y=%0d exp=%0d", a, b, c, y, exp_v);
    end
    #1 clk = 1'b1;
    #1 clk = 1'b0;
    checks++;
    if (longint'(y_reg) != exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL registered a=%0d b=%0d c=%0d y=%0d exp=%0d", a, b, c, y_reg, exp_v);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      b = '1; c = '1; check1();
      b = '0; c = '0; check1();
      b = '1; c = '0; check1();
      for (int n = 0; n < 40; n++) begin
        b = 10'($urandom()); c = 12'($urandom()); check1();
      end
    end
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 128; j++) begin
        a2 = 5'(i); b2 = 7'(j); c2 = 6'($urandom());
        #1;
        checks++;
        if (int'(y2) != (i * j + int'(c2) * 8) % 16384) begin
          failures++;
          if (failures < 10) $display("FAIL2 a=%0d b=%0d c=%0d y=%0d", i, j, c2, y2);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
