// fble: fracturable basic logic element, one fLUT with two optionally
// registered outputs and the operand/sum connection to one hard adder bit.
//
// The fLUT works as one 6-LUT or as two 5-LUTs sharing four inputs. Its two
// 5-LUT outputs always drive the hard adder's two operands (balanced
// interaction: the same amount of logic in front of each operand). Output 0
// carries the adder's sum when adder_en is set, otherwise the 6-LUT (frac =
// 0) or 5-LUT A (frac = 1). Output 1 carries 5-LUT B. Each output has a
// flip-flop and a bypass mux; each flip-flop's D input can instead take LUT
// input 5 directly, so an unrelated register can be packed into the
// element.
//
// The fLUT, the two outputs and the optional registers are the reference
// architecture's. Driving the adder from the two 5-LUT outputs of the fLUT,
// the choice of input 5 as the direct flip-flop input and the
// asynchronous active-low reset of the flip-flops to 0 are this design's
// choices.
//
// Timing: a combinational output follows the inputs in the same cycle; a
// registered output changes on the rising clock edge after its D value.
// The flip-flops clear asynchronously when rst_n is low.
//
// Output 0 is combinational in its inputs. Inside a cluster the crossbar
// can route it back to this element's inputs, so lint reports a circular
// path through this element; the configuration decides whether the loop
// is closed.
module fble
  import fpga_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  fble_cfg_t     cfg,
  input  logic [K-1:0]  in,
  input  logic          sum,    // sum bit from the hard adder
  output logic          add_a,  // operand a to the hard adder
  output logic          add_b,  // operand b to the hard adder
  output logic [1:0]    out
);

  logic       lut_a, lut_b, o6;
  logic [1:0] comb, d, q;

  flut u_flut (
    .cfg(cfg.lut), .frac(cfg.frac), .in(in),
    .lut_a(lut_a), .lut_b(lut_b), .o6(o6)
  );

  always_comb begin
    add_a   = lut_a;
    add_b   = lut_b;
    comb[0] = cfg.adder_en ? sum : (cfg.frac ? lut_a : o6);
    comb[1] = lut_b;
    for (int j = 0; j < 2; j++) begin
      d[j]   = cfg.ff_din[j] ? in[5] : comb[j];
      out[j] = cfg.reg_out[j] ? q[j] : comb[j];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end

endmodule
