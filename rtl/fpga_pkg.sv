// fpga_pkg: constants and configuration records shared by the soft logic
// block and its parts.
//
// The cluster sizes (8 logic elements, 6-input LUTs, 40 general inputs in
// four groups of ten) are the reference architecture's numbers. The layout
// of the configuration records is this design's own choice: each record is
// one slice of the cluster's configuration shift chain, most significant
// field first.
package fpga_pkg;

  // Cluster geometry.
  localparam int unsigned K          = 6;   // LUT inputs per logic element
  localparam int unsigned N_BLE      = 8;   // logic elements per cluster
  localparam int unsigned N_GEN_IN   = 40;  // general cluster inputs
  localparam int unsigned N_GROUPS   = 4;   // groups of logically equivalent inputs
  localparam int unsigned GROUP_SIZE = 10;  // inputs per group
  localparam int unsigned LUT_BITS   = 64;  // truth-table bits of a 6-LUT

  // Hard adder primitive placed under the logic elements of one cluster.
  typedef enum logic {
    ADDER_RIPPLE = 1'b0,  // eight chained 1-bit full adders
    ADDER_CLA4   = 1'b1   // two chained 4-bit carry-lookahead adders
  } adder_arch_e;

  // Configuration of one fracturable logic element (fBLE).
  //   lut      : fLUT truth table; [31:0] is 5-LUT A, [63:32] is 5-LUT B
  //   frac     : 1 = two 5-LUTs with 4 shared inputs, 0 = one 6-LUT
  //   adder_en : output 0 carries the hard adder's sum instead of the LUT
  //   reg_out  : per output, 1 = registered, 0 = combinational
  //   ff_din   : per flip-flop, 1 = load LUT input 5 directly, 0 = LUT/sum
  typedef struct packed {
    logic [LUT_BITS-1:0] lut;
    logic                frac;
    logic                adder_en;
    logic [1:0]          reg_out;
    logic [1:0]          ff_din;
  } fble_cfg_t;

  // Configuration of one non-fracturable logic element (BLE).
  //   lut      : 6-LUT truth table; [31:0] and [63:32] are its two 5-LUT halves
  //   adder_en : output carries the hard adder's sum instead of the 6-LUT
  //   reg_out  : 1 = registered output, 0 = combinational
  //   ff_din   : 1 = flip-flop loads LUT input 5 directly
  //   fb_en    : 1 = LUT input 0 takes the flip-flop output (fast feedback)
  typedef struct packed {
    logic [LUT_BITS-1:0] lut;
    logic                adder_en;
    logic                reg_out;
    logic                ff_din;
    logic                fb_en;
  } ble_cfg_t;

endpackage
