// tb_counter_3_2 - exhaustive check of the 3|2 counter against its truth
// table (the two outputs must encode the number of ones at the inputs).
module tb_counter_3_2;
  logic a, b, c, s, cout;
  int checks = 0, failures = 0;

  counter_3_2 dut (.a(a), .b(b), .c(c), .s(s), .cout(cout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (2 * int'(cout) + int'(s) != int'(a) + int'(b) + int'(c)) begin
        failures++;
        $display("FAIL abc=%b: s=%b cout=%b", {a, b, c}, s, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
