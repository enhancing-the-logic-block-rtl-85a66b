// tb_hard_full_adder: exhaustive check of the 1-bit hard full adder against
// integer addition: {cout, sumout} must equal a + b + cin for all eight
// input combinations.
module tb_hard_full_adder;
  logic a, b, cin, sumout, cout;
  int checks = 0, failures = 0;

  hard_full_adder dut (.a(a), .b(b), .cin(cin), .sumout(sumout), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      checks++;
      if ({cout, sumout} != 2'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d -> cout=%0d sum=%0d", a, b, cin, cout, sumout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
