// tb_soft_logic_block: end-to-end test of the soft logic cluster at its
// default parameters (fracturable elements, CLA-4 hard adder).
//
// Each scenario builds a configuration image, shifts it in through the
// configuration chain, drives the general inputs and compares the
// cluster outputs with values computed from the inputs by integer
// arithmetic or Boolean expressions:
//   hard_add   8-bit addition on the hard adder, cin pin to cout pin
//   dummy_sub  7-bit subtraction started by a dummy adder bit (constant
//              operands 1,1 give the +1 carry; operand b is inverted)
//   reg_add    the same addition with registered sum outputs (1 cycle)
//   fractured  two independent 5-input functions per element
//   lut6       random 6-input functions
//   feedback   two-level logic through the crossbar feedback path
//   toggle     a registered element feeding itself back (a T flip-flop)
//   soft_add   2-bit addition in LUTs only: s1 and c2 in one fractured
//              LUT, s0 in a second element
//   mux_add    (sel ? X : Y) + (sel ? U : V): each 5-LUT half of every
//              element is a 2:1 mux in front of one adder operand
//   readback   the configuration shifted out again on cfg_out
// Each scenario counts how often it ran; one that never ran is a failure.
module tb_soft_logic_block;
  import fpga_pkg::*;

  localparam int SW     = 5;                   // select bits per pin
  localparam int XBAR_W = N_BLE * K * SW;      // 240
  localparam int ELEM_W = $bits(fble_cfg_t);   // 70
  localparam int CFG_W  = XBAR_W + N_BLE * ELEM_W;
  localparam int UNUSED = 31;                  // select value of an unused pin

  logic                clk = 1'b0, rst_n = 1'b0, cfg_en = 1'b0, cfg_in, cfg_out, cin, cout;
  logic [N_GEN_IN-1:0] gen_in;
  logic [2*N_BLE-1:0]  out;
  logic [CFG_W-1:0]    img;
  int checks = 0, failures = 0;

  typedef enum int {M_HARD_ADD, M_DUMMY_SUB, M_REG_ADD, M_FRACTURED, M_LUT6, M_FEEDBACK,
                    M_TOGGLE, M_SOFT_ADD, M_MUX_ADD, M_READBACK, M_COUNT} mech_e;
  int mech [M_COUNT];

  soft_logic_block dut (
    .clk(clk), .rst_n(rst_n), .cfg_en(cfg_en), .cfg_in(cfg_in), .cfg_out(cfg_out),
    .gen_in(gen_in), .cin(cin), .out(out), .cout(cout)
  );

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- helpers
  task automatic expect_eq(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Local crossbar select that brings general input g to element e.
  function automatic int sel_gen(int e, int g);
    int pair = e / 2;
    if (g / 10 == pair) return g % 10;
    if (g / 10 == (pair + 1) % 4) return 10 + g % 10;
    $fatal(1, "general input %0d cannot reach element %0d", g, e);
    return UNUSED;
  endfunction

  // Local crossbar select that brings output k of element j to element e.
  function automatic int sel_fb(int e, int j, int k);
    int r = (j - 2 * (e / 2) + N_BLE) % N_BLE;
    if (r >= 4) $fatal(1, "element %0d output cannot reach element %0d", j, e);
    return 20 + 2 * r + k;
  endfunction

  function automatic void clear_image();
    img = '0;
    for (int i = 0; i < N_BLE * K; i++) img[i*SW +: SW] = SW'(UNUSED);
  endfunction

  function automatic void set_pin(int e, int p, int sel);
    img[(e*K + p)*SW +: SW] = SW'(sel);
  endfunction

  function automatic void set_elem(int e, fble_cfg_t c);
    img[XBAR_W + e*ELEM_W +: ELEM_W] = c;
  endfunction

  // Truth table of a 5-LUT half from a function number (see fn5).
  function automatic logic fn5(int f, logic [4:0] x);
    case (f)
      0: return x[0];                  // pass input 0
      1: return x[1];                  // pass input 1
      2: return ~x[1];                 // invert input 1
      3: return 1'b1;                  // constant 1
      4: return &x;                    // AND of five
      5: return ^x;                    // XOR of five
      6: return x[0] ^ x[1];
      7: return ~x[0];
      8: return x[0] ^ x[1] ^ x[2];    // sum of c0, a0, b0
      9: begin                         // s1 of c0,a0,b0,a1,b1
           logic c1 = (x[1] & x[2]) | (x[0] & (x[1] ^ x[2]));
           return x[3] ^ x[4] ^ c1;
         end
      10: begin                        // c2 of c0,a0,b0,a1,b1
           logic c1 = (x[1] & x[2]) | (x[0] & (x[1] ^ x[2]));
           return (x[3] & x[4]) | (c1 & (x[3] ^ x[4]));
         end
      11: return x[0] ? x[1] : x[2];  // A half: sel ? x : y
      12: return x[0] ? x[3] : x[4];  // B half: sel ? u : v (x[4] is pin 5)
      default: return 1'b0;
    endcase
  endfunction

  function automatic logic [31:0] table5(int f);
    logic [31:0] t;
    for (int n = 0; n < 32; n++) t[n] = fn5(f, 5'(n));
    return t;
  endfunction

  function automatic fble_cfg_t elem(int fa, int fb_, logic frac, logic add, logic [1:0] reg_out);
    fble_cfg_t c;
    c = '0;
    c.lut      = {table5(fb_), table5(fa)};
    c.frac     = frac;
    c.adder_en = add;
    c.reg_out  = reg_out;
    return c;
  endfunction

  // Shift the image in with the cluster held in reset, then release reset
  // unless told to keep it (a random image may hold live feedback loops).
  task automatic load(bit run_after = 1'b1);
    @(negedge clk);
    rst_n  = 1'b0;
    cfg_en = 1'b1;
    for (int i = CFG_W - 1; i >= 0; i--) begin
      cfg_in = img[i];
      @(negedge clk);
    end
    cfg_en = 1'b0;
    rst_n  = run_after;
  endtask

  // General inputs carrying operand bits for element e: a at pin 0, b at pin 1.
  function automatic int ga(int e); return 10 * (e / 2) + 2 * (e % 2);     endfunction
  function automatic int gb(int e); return 10 * (e / 2) + 2 * (e % 2) + 1; endfunction

  function automatic logic [7:0] sum_bits();
    logic [7:0] s;
    for (int e = 0; e < N_BLE; e++) s[e] = out[2*e];
    return s;
  endfunction

  // -------------------------------------------------------------- scenarios
  task automatic adder_image(logic [1:0] reg_out);
    clear_image();
    for (int e = 0; e < N_BLE; e++) begin
      set_pin(e, 0, sel_gen(e, ga(e)));
      set_pin(e, 1, sel_gen(e, gb(e)));
      set_elem(e, elem(0, 1, 1'b1, 1'b1, reg_out));
    end
  endtask

  task automatic drive_operands(logic [7:0] a, logic [7:0] b);
    gen_in = '0;
    for (int e = 0; e < N_BLE; e++) begin
      gen_in[ga(e)] = a[e];
      gen_in[gb(e)] = b[e];
    end
  endtask

  task automatic run_hard_add();
    adder_image(2'b00);
    load();
    for (int i = 0; i < 200; i++) begin
      logic [7:0] a = 8'($urandom), b = 8'($urandom);
      logic       c = 1'($urandom);
      logic [8:0] exp;
      if (i == 0) begin a = 8'hFF; b = 8'h00; c = 1'b1; end  // full carry ripple
      drive_operands(a, b);
      cin = c;
      #1;
      exp = 9'(a) + 9'(b) + 9'(c);
      expect_eq({cout, sum_bits()}, exp, "hard_add");
      mech[M_HARD_ADD]++;
    end
  endtask

  task automatic run_reg_add();
    adder_image(2'b01);
    load();
    for (int i = 0; i < 50; i++) begin
      logic [7:0] a = 8'($urandom), b = 8'($urandom), held;
      @(negedge clk);
      held = sum_bits();
      drive_operands(a, b);
      cin = 1'b0;
      #1;
      expect_eq(sum_bits(), held, "reg_add holds until the edge");
      @(negedge clk);
      expect_eq(sum_bits(), 8'(a + b), "reg_add after one edge");
      mech[M_REG_ADD]++;
    end
  endtask

  task automatic run_dummy_sub();
    clear_image();
    set_elem(0, elem(3, 3, 1'b1, 1'b1, 2'b00));  // dummy bit: operands 1, 1
    for (int e = 1; e < N_BLE; e++) begin
      set_pin(e, 0, sel_gen(e, ga(e)));
      set_pin(e, 1, sel_gen(e, gb(e)));
      set_elem(e, elem(0, 2, 1'b1, 1'b1, 2'b00));  // a, NOT b
    end
    load();
    cin = 1'b0;
    for (int i = 0; i < 200; i++) begin
      logic [6:0] a = 7'($urandom), b = 7'($urandom), d;
      if (i == 1) b = a;
      drive_operands({a, 1'b0}, {b, 1'b0});
      #1;
      d = a - b;
      expect_eq(sum_bits() >> 1, d, "dummy_sub difference");
      expect_eq(cout, a >= b, "dummy_sub no-borrow");
      mech[M_DUMMY_SUB]++;
    end
  endtask

  task automatic run_fractured();
    clear_image();
    for (int e = 0; e < N_BLE; e++) begin
      int base = (e % 2) ? 10 : 0;
      for (int p = 0; p < K; p++) set_pin(e, p, base + p);
      set_elem(e, elem(4, 5, 1'b1, 1'b0, 2'b00));  // A = AND, B = XOR
    end
    load();
    for (int i = 0; i < 200; i++) begin
      gen_in = {8'($urandom), $urandom};
      #1;
      for (int e = 0; e < N_BLE; e++) begin
        int g0 = (e % 2) ? 10 * ((e / 2 + 1) % 4) : 10 * (e / 2);
        logic [5:0] x = gen_in[g0 +: 6];
        expect_eq(out[2*e],   &x[4:0], "fractured A");
        expect_eq(out[2*e+1], ^{x[5], x[3:0]}, "fractured B");
      end
      mech[M_FRACTURED]++;
    end
  endtask

  task automatic run_lut6();
    logic [63:0] t [N_BLE];
    int          src [N_BLE][K];
    clear_image();
    for (int e = 0; e < N_BLE; e++) begin
      fble_cfg_t c = '0;
      t[e] = {$urandom, $urandom};
      c.lut = t[e];
      set_elem(e, c);
      for (int p = 0; p < K; p++) begin
        int loc = $urandom_range(0, 19);
        src[e][p] = (loc < 10) ? 10 * (e / 2) + loc : 10 * ((e / 2 + 1) % 4) + loc - 10;
        set_pin(e, p, loc);
      end
    end
    load();
    for (int i = 0; i < 200; i++) begin
      gen_in = {8'($urandom), $urandom};
      #1;
      for (int e = 0; e < N_BLE; e++) begin
        logic [5:0] x;
        for (int p = 0; p < K; p++) x[p] = gen_in[src[e][p]];
        expect_eq(out[2*e], t[e][x], "lut6");
      end
      mech[M_LUT6]++;
    end
  endtask

  task automatic run_feedback();
    // element 0: A = g0 ^ g1; element 1: A = (element 0 output A) ^ g12.
    clear_image();
    set_pin(0, 0, sel_gen(0, 0));
    set_pin(0, 1, sel_gen(0, 1));
    set_elem(0, elem(6, 0, 1'b1, 1'b0, 2'b00));
    set_pin(1, 0, sel_fb(1, 0, 0));
    set_pin(1, 1, sel_gen(1, 12));
    set_elem(1, elem(6, 0, 1'b1, 1'b0, 2'b00));
    // element 3 (sub-crossbar 1) reads element 5's output (sub-crossbar 2)
    set_pin(5, 0, sel_gen(5, 25));
    set_elem(5, elem(7, 0, 1'b1, 1'b0, 2'b00));    // A = NOT g25
    set_pin(3, 0, sel_fb(3, 5, 0));
    set_pin(3, 1, sel_gen(3, 15));
    set_elem(3, elem(6, 0, 1'b1, 1'b0, 2'b00));    // A = fb ^ g15
    load();
    for (int i = 0; i < 100; i++) begin
      gen_in = {8'($urandom), $urandom};
      #1;
      expect_eq(out[2], gen_in[0] ^ gen_in[1] ^ gen_in[12], "feedback pair");
      expect_eq(out[6], 1'(~gen_in[25] ^ gen_in[15]), "feedback across sub-crossbars");
      mech[M_FEEDBACK]++;
    end
  endtask

  task automatic run_toggle();
    logic prev;
    clear_image();
    set_pin(2, 0, sel_fb(2, 2, 0));
    set_elem(2, elem(7, 0, 1'b1, 1'b0, 2'b01));    // A = NOT in0, registered
    load();
    rst_n = 1'b0; #1;
    expect_eq(out[4], 1'b0, "toggle reset");
    rst_n = 1'b1;
    prev = out[4];
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      expect_eq(out[4], 1'(~prev), "toggle");
      prev = out[4];
      mech[M_TOGGLE]++;
    end
  endtask

  task automatic run_soft_add();
    // element 4 (pair 2, own group inputs 20..29):
    //   pins 0..4 = c0, a0, b0, a1, b1 on inputs 20..24, pin 5 = b1 again
    //   A = s1, B = c2 (B sees pins 0..3 and 5, which carry the same values)
    // element 5 (same pair): A = s0 from pins 0..2 on inputs 20..22.
    clear_image();
    for (int p = 0; p < 5; p++) set_pin(4, p, sel_gen(4, 20 + p));
    set_pin(4, 5, sel_gen(4, 24));
    set_elem(4, elem(9, 10, 1'b1, 1'b0, 2'b00));
    for (int p = 0; p < 3; p++) set_pin(5, p, sel_gen(5, 20 + p));
    set_elem(5, elem(8, 0, 1'b1, 1'b0, 2'b00));
    load();
    for (int n = 0; n < 32; n++) begin
      logic c0, a0, b0, a1, b1;
      logic [2:0] exp;
      {b1, a1, b0, a0, c0} = 5'(n);
      gen_in = '0;
      gen_in[24:20] = {b1, a1, b0, a0, c0};
      #1;
      exp = 3'({a1, a0}) + 3'({b1, b0}) + 3'(c0);
      expect_eq({out[9], out[8], out[10]}, exp, "soft 2-bit add");
      mech[M_SOFT_ADD]++;
    end
  endtask

  // Group g carries sel on input 10g; the even element of the pair takes
  // x, y, u, v on 10g+1..4 and the odd element on 10g+5..8.
  task automatic run_mux_add();
    clear_image();
    for (int e = 0; e < N_BLE; e++) begin
      int base = 10 * (e / 2) + 1 + 4 * (e % 2);
      set_pin(e, 0, sel_gen(e, 10 * (e / 2)));
      set_pin(e, 1, sel_gen(e, base));
      set_pin(e, 2, sel_gen(e, base + 1));
      set_pin(e, 3, sel_gen(e, base + 2));
      set_pin(e, 5, sel_gen(e, base + 3));
      set_elem(e, elem(11, 12, 1'b1, 1'b1, 2'b00));
    end
    load();
    for (int i = 0; i < 200; i++) begin
      logic [7:0] x, y, u, v;
      logic       sel, c;
      logic [8:0] exp;
      x = 8'($urandom); y = 8'($urandom); u = 8'($urandom); v = 8'($urandom);
      sel = 1'(i % 2); c = 1'($urandom);
      gen_in = '0;
      for (int e = 0; e < N_BLE; e++) begin
        int base = 10 * (e / 2) + 1 + 4 * (e % 2);
        gen_in[10 * (e / 2)] = sel;
        gen_in[base]     = x[e];
        gen_in[base + 1] = y[e];
        gen_in[base + 2] = u[e];
        gen_in[base + 3] = v[e];
      end
      cin = c;
      #1;
      exp = 9'(sel ? x : y) + 9'(sel ? u : v) + 9'(c);
      expect_eq({cout, sum_bits()}, exp, "mux_add");
      mech[M_MUX_ADD]++;
    end
    cin = 1'b0;
  endtask

  task automatic run_readback();
    logic [CFG_W-1:0] seen;
    // Shift the image in again; the previous contents come out first.
    for (int i = CFG_W - 1; i >= 0; i--) img[i] = 1'($urandom);
    load(1'b0);
    @(negedge clk);
    rst_n  = 1'b0;
    cfg_en = 1'b1;
    for (int i = CFG_W - 1; i >= 0; i--) begin
      seen[i] = cfg_out;
      cfg_in  = img[i];
      @(negedge clk);
    end
    cfg_en = 1'b0;
    expect_eq(32'(seen == img), 1, "configuration readback");
    mech[M_READBACK]++;
  endtask

  initial begin
    rst_n = 1'b0; cfg_en = 1'b0; cfg_in = 1'b0; cin = 1'b0; gen_in = '0;
    foreach (mech[m]) mech[m] = 0;
    if (dut.CFG_W != CFG_W) $fatal(1, "configuration width %0d", dut.CFG_W);
    // rst_n stays low until the first configuration is loaded.
    repeat (2) @(negedge clk);

    run_hard_add();
    run_dummy_sub();
    run_reg_add();
    run_fractured();
    run_lut6();
    run_feedback();
    run_toggle();
    run_soft_add();
    run_mux_add();
    run_readback();

    for (int m = 0; m < M_COUNT; m++) begin
      $display("mechanism %s exercised %0d times", mech_e'(m), mech[m]);
      checks++;
      if (mech[m] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
