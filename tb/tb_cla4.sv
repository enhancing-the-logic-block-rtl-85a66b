// tb_cla4: checks the 4-bit carry-lookahead adder.
// First the six operand pairs of the reference waveform with their printed
// sum, generate, propagate and carry vectors; then all 512 input
// combinations against integer addition, and g/p against a&b and a|b.
module tb_cla4;
  logic [3:0] a, b, sum, g, p;
  logic [4:0] c;
  logic       cin, cout;
  int checks = 0, failures = 0;

  cla4 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .g(g), .p(p), .c(c));

  // a, b, sum[4:0], c[4:0], g, p as printed in the reference waveform (cin = 0)
  typedef struct { int a; int b; int s; logic [4:0] c; logic [3:0] g; logic [3:0] p; } vec_t;
  vec_t v [6] = '{
    '{0, 0,  0, 5'b00000, 4'b0000, 4'b0000},
    '{3, 5,  8, 5'b01110, 4'b0001, 4'b0111},
    '{3, 10, 13, 5'b00100, 4'b0010, 4'b1011},
    '{5, 5,  10, 5'b01010, 4'b0101, 4'b0101},
    '{3, 7,  10, 5'b01110, 4'b0011, 4'b0111},
    '{9, 5,  14, 5'b00010, 4'b0001, 4'b1101}
  };

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (v[i]) begin
      a = 4'(v[i].a); b = 4'(v[i].b); cin = 1'b0;
      #1;
      checks++;
      if ({cout, sum} != 5'(v[i].s) || c != v[i].c || g != v[i].g || p != v[i].p) begin
        failures++;
        $display("FAIL waveform vector %0d: sum=%0d c=%b g=%b p=%b", i, {cout, sum}, c, g, p);
      end
    end
    for (int n = 0; n < 512; n++) begin
      {cin, a, b} = 9'(n);
      #1;
      checks++;
      if ({cout, sum} != 5'(int'(a) + int'(b) + int'(cin)) || g != (a & b) || p != (a | b)
          || c[0] != cin || c[4] != cout) begin
        failures++;
        $display("FAIL %0d + %0d + %0d -> %0d", a, b, cin, {cout, sum});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
