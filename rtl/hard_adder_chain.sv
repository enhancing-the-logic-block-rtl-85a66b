// hard_adder_chain: the hard adder under the logic elements of one cluster,
// built either from ripple full adders or from 4-bit carry-lookahead
// adders.
//
// Bit i takes its operands from logic element i and returns its sum there.
// With ADDER_CLA4 the N bits are split into N/4 CLA-4 blocks whose carries
// ripple from one block to the next. Both primitives are the reference
// architecture's; choosing CLA-4 as the default is this design's choice,
// and so is N/4 chaining inside the cluster. Purely combinational.
module hard_adder_chain
  import fpga_pkg::*;
#(
  parameter int unsigned N          = N_BLE,
  parameter adder_arch_e ADDER_ARCH = ADDER_CLA4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  if (ADDER_ARCH == ADDER_RIPPLE) begin : g_ripple
    ripple_carry_chain #(.N(N)) u_rca (
      .a(a), .b(b), .cin(cin), .sum(sum), .cout(cout)
    );
  end else begin : g_cla
    localparam int unsigned NB = N / 4;
    logic [NB:0] bc;
    assign bc[0] = cin;
    for (genvar j = 0; j < NB; j++) begin : g_blk
      logic [3:0] g_unused, p_unused;
      logic [4:0] c_unused;
      cla4 u_cla (
        .a(a[4*j +: 4]), .b(b[4*j +: 4]), .cin(bc[j]),
        .sum(sum[4*j +: 4]), .cout(bc[j+1]),
        .g(g_unused), .p(p_unused), .c(c_unused)
      );
    end
    assign cout = bc[NB];
    // A width that is not a multiple of four is not supported.
    if (N % 4 != 0) begin : g_bad_width
      $error("hard_adder_chain: N must be a multiple of 4 with ADDER_CLA4");
    end
  end

endmodule
