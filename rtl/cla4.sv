// cla4: 4-bit hardened carry-lookahead adder, the alternative hard adder
// primitive that spans four logic elements.
//
// Per bit it forms generate g = a & b and propagate p = a | b, and computes
// every carry from cin directly:
//   c1 = g0 | p0 c0
//   c2 = g1 | p1 g0 | p1 p0 c0
//   c3 = g2 | p2 g1 | p2 p1 g0 | p2 p1 p0 c0
//   c4 = g3 | p3 g2 | p3 p2 g1 | p3 p2 p1 g0 | p3 p2 p1 p0 c0
// and sum = a ^ b ^ c. The inclusive-OR propagate matches the reference
// waveform (a = 9, b = 5 gives p = 1101, g = 0001, carries 00010, sum 14).
// The generate, propagate and carry vectors are outputs for observation.
// Purely combinational.
module cla4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] sum,
  output logic       cout,
  output logic [3:0] g,   // bit generate
  output logic [3:0] p,   // bit propagate (inclusive OR)
  output logic [4:0] c    // carries, c[0] = cin, c[4] = cout
);

  always_comb begin
    g    = a & b;
    p    = a | b;
    c[0] = cin;
    c[1] = g[0] | (p[0] & cin);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cin);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & cin);
    c[4] = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0])
         | (p[3] & p[2] & p[1] & p[0] & cin);
    sum  = a ^ b ^ c[3:0];
    cout = c[4];
  end

endmodule
