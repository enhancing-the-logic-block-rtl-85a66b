// crossbar: the cluster's 50%-depopulated local crossbar, built from four
// smaller fully populated crossbars.
//
// It connects the 40 general cluster inputs and the logic elements'
// feedback outputs to the logic-element input pins. Sub-crossbar s
// (s = 0..3) drives all K pins of logic elements 2s and 2s+1. Its inputs
// are input groups s and s+1 (mod 4), twenty general inputs, followed by
// the outputs of logic elements 2s .. 2s+3 (mod 8), FB_PER_BLE each. Every
// pin therefore reaches exactly half of the general inputs and half of the
// feedback outputs. The sub-crossbar's local input numbering is:
//   0..9    general inputs 10*s .. 10*s+9
//   10..19  general inputs 10*((s+1)%4) .. +9
//   20+r*FB_PER_BLE+k  output k of logic element (2s+r)%8
// Configuration: SW select bits per logic-element pin, pin p of element e
// at sel[(e*K+p)*SW +: SW]; a value past the last input drives the pin low.
//
// The four fully populated sub-crossbars, the groups of ten inputs and the
// 50% population are the reference architecture's; which groups and which
// feedbacks each sub-crossbar sees is this design's choice.
// Purely combinational.
module crossbar
  import fpga_pkg::*;
#(
  parameter int unsigned FB_PER_BLE = 2,  // outputs per logic element
  parameter int unsigned M_SUB = 2 * GROUP_SIZE + (N_BLE / 2) * FB_PER_BLE,
  parameter int unsigned SW    = $clog2(M_SUB + 1)
) (
  input  logic [N_GEN_IN-1:0]         gen_in,  // general cluster inputs
  input  logic [N_BLE*FB_PER_BLE-1:0] fb,      // element e output k at e*FB_PER_BLE+k
  input  logic [N_BLE*K*SW-1:0]       sel,     // configuration
  output logic [N_BLE*K-1:0]          pin      // element e pin p at e*K+p
);

  localparam int unsigned BLE_PER_SUB = N_BLE / N_GROUPS;  // 2
  localparam int unsigned P_SUB       = BLE_PER_SUB * K;   // 12
  localparam int unsigned FB_BLES     = N_BLE / 2;         // 4

  for (genvar s = 0; s < N_GROUPS; s++) begin : g_sub
    logic [M_SUB-1:0] din;
    always_comb begin
      for (int i = 0; i < GROUP_SIZE; i++) begin
        din[i]              = gen_in[s * GROUP_SIZE + i];
        din[GROUP_SIZE + i] = gen_in[((s + 1) % N_GROUPS) * GROUP_SIZE + i];
      end
      for (int r = 0; r < FB_BLES; r++) begin
        for (int k = 0; k < FB_PER_BLE; k++) begin
          din[2 * GROUP_SIZE + r * FB_PER_BLE + k] =
            fb[((BLE_PER_SUB * s + r) % N_BLE) * FB_PER_BLE + k];
        end
      end
    end

    xbar_full #(.M(M_SUB), .P(P_SUB), .SW(SW)) u_xbar (
      .din (din),
      .sel (sel[s * P_SUB * SW +: P_SUB * SW]),
      .dout(pin[s * P_SUB +: P_SUB])
    );
  end

endmodule
