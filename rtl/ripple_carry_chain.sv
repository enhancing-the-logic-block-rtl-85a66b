// ripple_carry_chain: N hard full adders chained linearly, one per logic
// element of a cluster.
//
// Bit 0 (the first logic element) takes the cluster's cin pin and the last
// bit drives the cout pin. There is no carry-start multiplexer: an addition
// is started by placing a dummy adder bit, whose operands are constants,
// below its least significant bit, which produces a 0 carry (a = b = 0) or
// a 1 carry (a = b = 1). Eight bits per cluster is the reference
// architecture's number. Purely combinational.
module ripple_carry_chain #(
  parameter int unsigned N = 8  // adder bits, one per logic element
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  logic [N:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_bit
    hard_full_adder u_fa (
      .a(a[i]), .b(b[i]), .cin(c[i]), .sumout(sum[i]), .cout(c[i+1])
    );
  end

  assign cout = c[N];

endmodule
