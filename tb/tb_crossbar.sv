// tb_crossbar: checks the 50%-depopulated crossbar with random selects and
// random data. For each logic-element pin the expected source is worked
// out from the documented numbering: selects 0..9 reach the element pair's
// own input group, 10..19 the next group, 20..27 the outputs of the four
// elements starting at the pair's first one, and larger selects give 0.
// A second part walks a single 1 over every general input and checks which
// pins may see it: exactly those whose sub-crossbar owns its group.
module tb_crossbar;
  import fpga_pkg::*;
  localparam int FBP = 2;
  localparam int SW  = 5;
  logic [N_GEN_IN-1:0]    gen_in;
  logic [N_BLE*FBP-1:0]   fb;
  logic [N_BLE*K*SW-1:0]  sel;
  logic [N_BLE*K-1:0]     pin;
  int checks = 0, failures = 0;

  crossbar #(.FB_PER_BLE(FBP)) dut (.gen_in(gen_in), .fb(fb), .sel(sel), .pin(pin));

  function automatic logic expected(int e, int v);
    int pair = e / 2;
    if (v < 10) return gen_in[10 * pair + v];
    if (v < 20) return gen_in[10 * ((pair + 1) % 4) + (v - 10)];
    if (v < 28) return fb[(((2 * pair) + (v - 20) / 2) % 8) * 2 + (v % 2)];
    return 1'b0;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < N_BLE * K; i++) sel[i*SW +: SW] = SW'($urandom_range(0, 31));
      gen_in = {8'($urandom), $urandom};
      fb     = 16'($urandom);
      #1;
      for (int e = 0; e < N_BLE; e++)
        for (int p = 0; p < K; p++) begin
          checks++;
          if (pin[e*K+p] !== expected(e, int'(sel[(e*K+p)*SW +: SW]))) begin
            failures++;
            $display("FAIL trial %0d element %0d pin %0d sel %0d", t, e, p, sel[(e*K+p)*SW +: SW]);
          end
        end
    end
    // Reachability: input g can reach element e only via select g%10 or 10+g%10.
    fb = '0;
    for (int g = 0; g < N_GEN_IN; g++) begin
      gen_in = '0;
      gen_in[g] = 1'b1;
      for (int e = 0; e < N_BLE; e++) begin
        int grp;
        bit own, next;
        grp  = g / 10;
        own  = (grp == e / 2);
        next = (grp == (e / 2 + 1) % 4);
        for (int i = 0; i < N_BLE * K; i++) sel[i*SW +: SW] = SW'(g % 10);
        #1;
        checks++;
        if (pin[e*K] !== own) begin
          failures++;
          $display("FAIL reach g=%0d e=%0d own", g, e);
        end
        for (int i = 0; i < N_BLE * K; i++) sel[i*SW +: SW] = SW'(10 + g % 10);
        #1;
        checks++;
        if (pin[e*K + 5] !== next) begin
          failures++;
          $display("FAIL reach g=%0d e=%0d next", g, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
