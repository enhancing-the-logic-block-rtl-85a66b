// xbar_full: fully populated crossbar. Each of the P outputs is an
// M-input multiplexer whose select is SW configuration bits; a select
// value of M or above drives the output low (pin unused).
// Purely combinational.
module xbar_full #(
  parameter int unsigned M  = 28,  // inputs
  parameter int unsigned P  = 12,  // outputs
  parameter int unsigned SW = (M > 1) ? $clog2(M + 1) : 1  // select bits per output
) (
  input  logic [M-1:0]    din,
  input  logic [P*SW-1:0] sel,
  output logic [P-1:0]    dout
);

  always_comb begin
    for (int o = 0; o < P; o++) begin
      dout[o] = 1'b0;
      for (int i = 0; i < M; i++) begin
        if (sel[o*SW +: SW] == SW'(i)) dout[o] = din[i];
      end
    end
  end

endmodule
