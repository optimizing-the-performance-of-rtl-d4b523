// counter_2_2 - the 2|2 counter (half adder) used where a column of the
// Wallace tree has two bits left over: s = a ^ b, cout = a & b.
// Purely combinational.
module counter_2_2 (
  input  logic a,
  input  logic b,
  output logic s,
  output logic cout
);
  assign s    = a ^ b;
  assign cout = a & b;
endmodule
