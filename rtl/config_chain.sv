// config_chain: the cluster's configuration memory, written as a shift
// chain.
//
// While cfg_en is high, each rising clock edge shifts cfg_in into bit 0 and
// every bit up by one; the bit shifted out of the top appears on cfg_out so
// that chains of several clusters can be joined. The first bit shifted in
// therefore ends in bit W-1. While cfg_en is low the contents hold and
// drive the cluster's multiplexers and LUTs like static configuration
// cells. The memory has no reset: it is valid once W bits have been
// shifted in. The reference architecture treats configuration as
// SRAM cells and does not say how they are loaded; the shift chain is this
// design's choice.
module config_chain #(
  parameter int unsigned W = 8  // configuration bits
) (
  input  logic         clk,
  input  logic         cfg_en,   // shift enable
  input  logic         cfg_in,   // serial data in
  output logic         cfg_out,  // serial data out (bit W-1)
  output logic [W-1:0] q         // parallel configuration
);

  always_ff @(posedge clk) begin
    if (cfg_en) q <= {q[W-2:0], cfg_in};
  end

  assign cfg_out = q[W-1];

endmodule
