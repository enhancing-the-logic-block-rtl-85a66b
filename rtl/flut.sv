// flut: fracturable 6-input look-up table.
//
// The table is built as two 5-LUTs (A and B) and a 2:1 mux, as a 6-LUT is
// in silicon. In 6-LUT mode (frac = 0) both halves see in[4:0] and in[5]
// selects between them, so o6 = cfg[in]. In fractured mode (frac = 1) the
// two 5-LUTs share in[3:0]; A takes in[4] as its fifth input and B takes
// in[5], giving two independent 5-input functions on six pins.
//
// The two modes and the four shared inputs are the reference architecture's;
// which pins are shared and which are private, and the truth-table bit
// order ([31:0] = A, [63:32] = B, index = input value), are this design's
// choices. The 5-LUT outputs are brought out separately so that a hard
// adder can be driven by them.
//
// Purely combinational.
module flut
  import fpga_pkg::*;
(
  input  logic [LUT_BITS-1:0] cfg,    // truth table
  input  logic                frac,   // 1 = two 5-LUTs, 0 = one 6-LUT
  input  logic [K-1:0]        in,
  output logic                lut_a,  // 5-LUT A: cfg[31:0][{in4,in3..in0}]
  output logic                lut_b,  // 5-LUT B: cfg[63:32][{in5 or in4, in3..in0}]
  output logic                o6      // 6-LUT output (valid when frac = 0)
);

  logic [4:0] idx_a, idx_b;

  always_comb begin
    idx_a = in[4:0];
    idx_b = {frac ? in[5] : in[4], in[3:0]};
    lut_a = cfg[{1'b0, idx_a}];
    lut_b = cfg[{1'b1, idx_b}];
    o6    = in[5] ? lut_b : lut_a;
  end

endmodule
