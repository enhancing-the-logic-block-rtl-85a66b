// tb_ble: checks the non-fracturable logic element.
//  - 6-LUT: output is the table bit for the six inputs.
//  - balanced adder interaction: the adder operands are the two 5-LUT
//    halves evaluated on inputs 0..4, and with adder_en the output is the
//    sum input.
//  - registered output: one clock edge of latency; direct D from input 5.
//  - fast feedback: with fb_en and a table computing NOT(input 0), the
//    registered output toggles every clock.
module tb_ble;
  import fpga_pkg::*;
  logic        clk = 1'b0, rst_n;
  ble_cfg_t    cfg;
  logic [5:0]  in;
  logic        sum, add_a, add_b, out;
  int checks = 0, failures = 0;

  ble dut (.clk(clk), .rst_n(rst_n), .cfg(cfg), .in(in), .sum(sum),
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
    logic prev;
    rst_n = 1'b0; in = '0; sum = 1'b0;
    cfg = '0;
    #12 rst_n = 1'b1;

    t = {$urandom, $urandom};
    cfg.lut = t;
    for (int n = 0; n < 64; n++) begin
      in = 6'(n); #1;
      expect_eq(out, t[n], "6-LUT");
      expect_eq(add_a, t[n % 32], "operand a = low half");
      expect_eq(add_b, t[32 + n % 32], "operand b = high half");
    end

    cfg.adder_en = 1'b1;
    for (int n = 0; n < 4; n++) begin
      sum = 1'(n); in = 6'($urandom); #1;
      expect_eq(out, sum, "sum select");
    end
    cfg.adder_en = 1'b0;

    // registered: table = in0
    for (int n = 0; n < 64; n++) t[n] = n[0];
    cfg.lut = t; cfg.reg_out = 1'b1; in = '0;
    @(negedge clk);
    in = 6'b000001; #1;
    expect_eq(out, 1'b0, "registered before edge");
    @(negedge clk);
    expect_eq(out, 1'b1, "registered after edge");
    cfg.ff_din = 1'b1; in = 6'b000001;   // D = in5 = 0
    @(negedge clk);
    expect_eq(out, 1'b0, "direct D");
    cfg.ff_din = 1'b0;

    // fast feedback: table = NOT in0, input 0 from the flip-flop
    for (int n = 0; n < 64; n++) t[n] = ~n[0];
    cfg.lut = t; cfg.fb_en = 1'b1; in = '0;
    @(negedge clk);
    prev = out;
    for (int i = 0; i < 6; i++) begin
      @(negedge clk);
      expect_eq(out, ~prev, "feedback toggle");
      prev = out;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
