// tb_fble: checks the fracturable logic element.
//  - 6-LUT mode: output 0 is the table bit for the six inputs.
//  - fractured mode: outputs 0 and 1 are two independent 5-input functions
//    (AND of inputs 0..4 and XOR of inputs 0..3 with input 5).
//  - adder mode: the adder operands are the two 5-LUT outputs and output 0
//    shows the sum input.
//  - registered outputs change one clock edge after their D value; the
//    direct flip-flop input loads input 5.
module tb_fble;
  import fpga_pkg::*;
  logic        clk = 1'b0, rst_n;
  fble_cfg_t   cfg;
  logic [5:0]  in;
  logic        sum, add_a, add_b;
  logic [1:0]  out;
  int checks = 0, failures = 0;

  fble dut (.clk(clk), .rst_n(rst_n), .cfg(cfg), .in(in), .sum(sum),
            .add_a(add_a), .add_b(add_b), .out(out));

  always #5 clk = ~clk;

  task automatic expect_eq(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] t;
    rst_n = 1'b0; in = '0; sum = 1'b0;
    cfg = '0;
    #12 rst_n = 1'b1;

    // 6-LUT mode, combinational
    t = {$urandom, $urandom};
    cfg.lut = t; cfg.frac = 1'b0;
    for (int n = 0; n < 64; n++) begin
      in = 6'(n); #1;
      expect_eq(out[0], t[n], "6-LUT");
    end

    // fractured: A = AND(in4..in0), B = XOR(in5, in3..in0)
    for (int n = 0; n < 32; n++) t[n] = (n == 31);
    for (int n = 0; n < 32; n++) t[32 + n] = ^5'(n);
    cfg.lut = t; cfg.frac = 1'b1;
    for (int n = 0; n < 64; n++) begin
      in = 6'(n); #1;
      expect_eq(out[0], &in[4:0], "5-LUT A");
      expect_eq(out[1], ^{in[5], in[3:0]}, "5-LUT B");
      expect_eq(add_a, &in[4:0], "adder operand a");
      expect_eq(add_b, ^{in[5], in[3:0]}, "adder operand b");
    end

    // adder mode: output 0 follows the sum input
    cfg.adder_en = 1'b1;
    for (int n = 0; n < 4; n++) begin
      sum = 1'(n); in = 6'($urandom); #1;
      expect_eq(out[0], sum, "sum select");
    end
    cfg.adder_en = 1'b0;

    // registered outputs: one clock edge of latency
    cfg.reg_out = 2'b11;
    @(negedge clk);
    in = 6'b011111;                 // A = 1, B = XOR(0,1111) = 0
    #1;
    expect_eq(out[0], 1'b0, "registered A before edge");
    @(negedge clk);
    expect_eq(out[0], 1'b1, "registered A after edge");
    expect_eq(out[1], 1'b0, "registered B after edge");
    in = 6'b100000;                 // A = 0, B = 1
    @(negedge clk);
    expect_eq(out[0], 1'b0, "registered A second");
    expect_eq(out[1], 1'b1, "registered B second");

    // direct flip-flop input from in[5]
    cfg.ff_din = 2'b01;
    in = 6'b111111;                 // A = 1 but ff0 must load in5 = 1; then in5 = 0
    @(negedge clk);
    expect_eq(out[0], 1'b1, "direct D in5=1");
    in = 6'b011111;                 // A = 1, in5 = 0
    @(negedge clk);
    expect_eq(out[0], 1'b0, "direct D in5=0");

    // asynchronous reset clears the registers
    in = 6'b111111;
    @(negedge clk);
    rst_n = 1'b0; #1;
    expect_eq(out[0], 1'b0, "reset out0");
    expect_eq(out[1], 1'b0, "reset out1");
    rst_n = 1'b1;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
