// ble: non-fracturable basic logic element, a 6-LUT with a hard adder
// mode, one optionally registered output and a fast feedback path.
//
// The 6-LUT is two 5-LUTs on inputs 0..4 and a mux on input 5. With the
// balanced adder interaction the two 5-LUT outputs drive the hard adder's
// two operands directly; a configurable output mux then picks the adder's
// sum (adder_en = 1) or the 6-LUT output. The flip-flop's D input takes
// that value or, with ff_din set, LUT input 5 directly; a bypass mux
// chooses between the flip-flop and the combinational value. With fb_en
// set, LUT input 0 takes the flip-flop output instead of its pin, the
// fast local path from the register back into the LUT.
//
// The 6-LUT, the balanced interaction, the optional register and the fast
// feedback path are the reference architecture's. Which LUT input the
// feedback path and the direct flip-flop input use, and the asynchronous
// active-low reset of the flip-flop to 0, are this design's choices.
//
// Timing: the combinational output follows the inputs in the same cycle;
// the registered output changes on the rising clock edge.
module ble
  import fpga_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  ble_cfg_t     cfg,
  input  logic [K-1:0] in,
  input  logic         sum,    // sum bit from the hard adder
  output logic         add_a,  // operand a to the hard adder
  output logic         add_b,  // operand b to the hard adder
  output logic         out
);

  logic [K-1:0] lut_in;
  logic         lut_a, lut_b, o6, comb, d, q;

  always_comb lut_in = {in[K-1:1], cfg.fb_en ? q : in[0]};

  // A 6-LUT is an fLUT held in its unfractured mode.
  flut u_lut (
    .cfg(cfg.lut), .frac(1'b0), .in(lut_in),
    .lut_a(lut_a), .lut_b(lut_b), .o6(o6)
  );

  always_comb begin
    add_a = lut_a;
    add_b = lut_b;
    comb  = cfg.adder_en ? sum : o6;
    d     = cfg.ff_din ? in[5] : comb;
    out   = cfg.reg_out ? q : comb;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= d;
  end

endmodule
