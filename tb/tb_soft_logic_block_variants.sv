// tb_soft_logic_block_variants: runs the cluster's other parameter sets
// (ripple-carry or CLA-4 hard adder, fracturable or non-fracturable
// elements) through slb_variant_check: hard addition, a subtraction started
// by a dummy adder bit, and a registered element feeding itself back.
module tb_soft_logic_block_variants;
  import fpga_pkg::*;
  logic clk = 1'b0;
  logic [2:0] done;
  int c [3], f [3];

  always #5 clk = ~clk;

  slb_variant_check #(.FRAC(1'b0), .ARCH(ADDER_RIPPLE)) u_nr (.clk(clk), .done(done[0]), .checks(c[0]), .failures(f[0]));
  slb_variant_check #(.FRAC(1'b0), .ARCH(ADDER_CLA4))   u_nc (.clk(clk), .done(done[1]), .checks(c[1]), .failures(f[1]));
  slb_variant_check #(.FRAC(1'b1), .ARCH(ADDER_RIPPLE)) u_fr (.clk(clk), .done(done[2]), .checks(c[2]), .failures(f[2]));

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2] + 1);
    $finish;
  end

  initial begin
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2]);
    $finish;
  end
endmodule
