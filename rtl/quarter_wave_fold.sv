// quarter_wave_fold - quarter-wave symmetry of the sine.
//
// Only the first quarter of the sine is generated. The two most significant
// phase bits pick the quadrant: the top bit is the sign of the sample
// (second half period is negative) and the next bit mirrors the quarter in
// time, which is done by inverting (one's complement) the remaining phase
// bits. The quarter-wave address therefore runs 0..max in quadrants 0 and 2
// and max..0 in quadrants 1 and 3. Purely combinational.
//
// Ports: phase (ADDR_W+2 bits, phase accumulator MSBs) -> addr (ADDR_W bits,
// quarter-wave address), sign.
module quarter_wave_fold #(
  parameter int unsigned ADDR_W = 12
) (
  input  logic [ADDR_W+1:0] phase,
  output logic [ADDR_W-1:0] addr,
  output logic              sign
);
  wire mirror = phase[ADDR_W];

  assign sign = phase[ADDR_W+1];
  assign addr = phase[ADDR_W-1:0] ^ {ADDR_W{mirror}};
endmodule
