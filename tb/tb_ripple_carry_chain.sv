// tb_ripple_carry_chain: checks the 8-bit ripple chain of hard full adders
// against integer addition, on corner cases (full carry propagation from
// cin to cout) and random operands.
module tb_ripple_carry_chain;
  localparam int N = 8;
  logic [N-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  ripple_carry_chain #(.N(N)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic check(input logic [N-1:0] ta, input logic [N-1:0] tb_, input logic tc);
    logic [N:0] exp;
    a = ta; b = tb_; cin = tc;
    #1;
    exp = {1'b0, ta} + {1'b0, tb_} + (N+1)'(tc);
    checks++;
    if ({cout, sum} != exp) begin
      failures++;
      $display("FAIL %0d + %0d + %0d -> %0d, expected %0d", ta, tb_, tc, {cout, sum}, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(8'hFF, 8'h00, 1'b1);   // carry ripples through all eight bits
    check(8'hFF, 8'hFF, 1'b1);
    check(8'h00, 8'h00, 1'b0);
    check(8'h80, 8'h80, 1'b0);
    check(8'h55, 8'hAA, 1'b1);
    for (int i = 0; i < 2000; i++) check(8'($urandom), 8'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
