// counter_3_2 - the 3|2 counter (binary full adder) of the Wallace tree.
//
// Counts the ones among three equally weighted input bits and returns the
// count as a sum bit (weight 1) and a carry bit (weight 2):
//     s = a ^ b ^ c,   cout = ab | bc | ac.
// Purely combinational; two gate delays in complementary logic.
module counter_3_2 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s,
  output logic cout
);
  assign s    = a ^ b ^ c;
  assign cout = (a & b) | (b & c) | (a & c);
endmodule
