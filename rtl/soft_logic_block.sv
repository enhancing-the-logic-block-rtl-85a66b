// soft_logic_block: one FPGA soft logic cluster with hardened arithmetic.
//
// The cluster holds N_BLE = 8 logic elements. A 50%-depopulated local
// crossbar (four fully populated sub-crossbars) routes the 40 general
// inputs and the elements' own outputs to the elements' 6 LUT inputs each.
// Under the elements runs an 8-bit hard adder: element i feeds bit i's two
// operands from its two 5-LUT halves and can output bit i's sum. The
// carry enters on cin (element 0 is the least significant bit) and leaves
// on cout, the dedicated carry link to the neighbouring cluster. There is
// no carry-start mux; an addition is started by a dummy adder bit whose
// operands are LUT constants.
//
// FRACTURABLE = 1 (default) uses fracturable elements (fble): each fLUT
// is one 6-LUT or two 5-LUTs sharing four inputs, and each element has two
// outputs, 16 in all. FRACTURABLE = 0 uses non-fracturable elements (ble)
// with one output each, 8 in all, and a fast register-to-LUT feedback
// path. ADDER_ARCH picks ripple full adders or 4-bit carry-lookahead
// adders for the hard adder.
//
// Configuration is shifted in on cfg_in while cfg_en is high, CFG_W bits,
// most significant bit first. Layout of the CFG_W-bit word:
//   [XBAR_W-1:0]                       crossbar selects, SW bits per pin,
//                                      element e pin p at (e*K+p)*SW
//   [XBAR_W + e*ELEM_W +: ELEM_W]      element e's record (fble_cfg_t or
//                                      ble_cfg_t from fpga_pkg)
// See crossbar.sv for the numbering of a sub-crossbar's inputs.
//
// Timing: outputs not registered in their element follow the inputs
// combinationally, including through the carry chain; registered outputs
// change on the rising edge of clk. rst_n clears the element flip-flops
// asynchronously, not the configuration. While rst_n is low or cfg_en is
// high the outputs fed back into the crossbar read as 0, like an FPGA
// start-up sequence that keeps the fabric quiet until it is configured; so
// hold rst_n low while loading. A loaded configuration may still close a
// combinational loop through the crossbar feedback; as in any FPGA, such
// a configuration is the user's error, and it is why lint reports a
// circular path through the feedback.
//
// Element count, input count and grouping, the 50% crossbar, the
// fracturable element and the hard adders with cin/cout are the reference
// architecture's; the configuration layout and its loading are this
// design's.
module soft_logic_block
  import fpga_pkg::*;
#(
  parameter bit          FRACTURABLE = 1'b1,
  parameter adder_arch_e ADDER_ARCH  = ADDER_CLA4,
  // Derived sizes; not meant to be overridden.
  parameter int unsigned FB     = FRACTURABLE ? 2 : 1,
  parameter int unsigned N_OUT  = N_BLE * FB,
  parameter int unsigned M_SUB  = 2 * GROUP_SIZE + (N_BLE / 2) * FB,
  parameter int unsigned SW     = $clog2(M_SUB + 1),
  parameter int unsigned XBAR_W = N_BLE * K * SW,
  parameter int unsigned ELEM_W = FRACTURABLE ? $bits(fble_cfg_t) : $bits(ble_cfg_t),
  parameter int unsigned CFG_W  = XBAR_W + N_BLE * ELEM_W
) (
  input  logic                clk,
  input  logic                rst_n,
  // configuration
  input  logic                cfg_en,
  input  logic                cfg_in,
  output logic                cfg_out,
  // logic
  input  logic [N_GEN_IN-1:0] gen_in,
  input  logic                cin,
  output logic [N_OUT-1:0]    out,
  output logic                cout
);

  logic [CFG_W-1:0]   cfg;
  logic [N_BLE*K-1:0] pin;
  logic [N_BLE-1:0]   add_a, add_b, add_sum;
  logic [N_OUT-1:0]   fb;

  // Local feedback is held low while the configuration is shifting or the
  // cluster is in reset, so that a partly loaded configuration cannot close
  // a live loop through the crossbar.
  always_comb fb = (rst_n && !cfg_en) ? out : '0;

  config_chain #(.W(CFG_W)) u_cfg (
    .clk(clk), .cfg_en(cfg_en), .cfg_in(cfg_in), .cfg_out(cfg_out), .q(cfg)
  );

  crossbar #(.FB_PER_BLE(FB), .M_SUB(M_SUB), .SW(SW)) u_xbar (
    .gen_in(gen_in), .fb(fb), .sel(cfg[XBAR_W-1:0]), .pin(pin)
  );

  for (genvar e = 0; e < N_BLE; e++) begin : g_elem
    if (FRACTURABLE) begin : g_f
      fble u_fble (
        .clk(clk), .rst_n(rst_n),
        .cfg(fble_cfg_t'(cfg[XBAR_W + e*ELEM_W +: ELEM_W])),
        .in(pin[e*K +: K]), .sum(add_sum[e]),
        .add_a(add_a[e]), .add_b(add_b[e]),
        .out(out[e*FB +: FB])
      );
    end else begin : g_n
      ble u_ble (
        .clk(clk), .rst_n(rst_n),
        .cfg(ble_cfg_t'(cfg[XBAR_W + e*ELEM_W +: ELEM_W])),
        .in(pin[e*K +: K]), .sum(add_sum[e]),
        .add_a(add_a[e]), .add_b(add_b[e]),
        .out(out[e])
      );
    end
  end

  hard_adder_chain #(.N(N_BLE), .ADDER_ARCH(ADDER_ARCH)) u_add (
    .a(add_a), .b(add_b), .cin(cin), .sum(add_sum), .cout(cout)
  );

endmodule
