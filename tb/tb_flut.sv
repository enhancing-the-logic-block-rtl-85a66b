// tb_flut: checks the fracturable LUT in both modes with random truth
// tables over all 64 input values.
// 6-LUT mode: o6 must be bit (in) of the table.
// Fractured mode: lut_a must be bit {in4,in3,in2,in1,in0} of the low half
// and lut_b bit {in5,in3,in2,in1,in0} of the high half, so that the two
// 5-LUTs share exactly inputs 0..3.
module tb_flut;
  import fpga_pkg::*;
  logic [63:0] cfg;
  logic        frac, lut_a, lut_b, o6;
  logic [5:0]  in;
  int checks = 0, failures = 0;

  flut dut (.cfg(cfg), .frac(frac), .in(in), .lut_a(lut_a), .lut_b(lut_b), .o6(o6));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20; t++) begin
      cfg = {$urandom, $urandom};
      for (int n = 0; n < 64; n++) begin
        in = 6'(n);
        frac = 1'b0;
        #1;
        checks++;
        if (o6 !== cfg[n]) begin
          failures++;
          $display("FAIL 6-LUT in=%0d o6=%0d", n, o6);
        end
        frac = 1'b1;
        #1;
        checks++;
        if (lut_a !== cfg[n % 32] || lut_b !== cfg[32 + (n % 16) + 16 * (n / 32)]) begin
          failures++;
          $display("FAIL 5-LUT pair in=%0d a=%0d b=%0d", n, lut_a, lut_b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
