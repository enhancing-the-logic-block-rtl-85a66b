// slb_variant_check: test harness for one parameter set of the soft logic
// cluster. It configures the cluster for an 8-bit hard addition, a 7-bit
// subtraction started by a dummy adder bit, random 6-input functions and a
// registered toggle element that feeds itself back (through the local
// fast path for non-fracturable elements, through the crossbar for
// fracturable ones), and compares the outputs with integer arithmetic.
// It raises done when finished and reports its check and failure counts.
module slb_variant_check
  import fpga_pkg::*;
#(
  parameter bit          FRAC = 1'b0,
  parameter adder_arch_e ARCH = ADDER_RIPPLE
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int FB     = FRAC ? 2 : 1;
  localparam int SW     = 5;
  localparam int XBAR_W = N_BLE * K * SW;
  localparam int ELEM_W = FRAC ? $bits(fble_cfg_t) : $bits(ble_cfg_t);
  localparam int CFG_W  = XBAR_W + N_BLE * ELEM_W;
  localparam int UNUSED = 31;

  logic                rst_n = 1'b0, cfg_en = 1'b0, cfg_in = 1'b0, cfg_out, cin = 1'b0, cout;
  logic [N_GEN_IN-1:0] gen_in = '0;
  logic [N_BLE*FB-1:0] out;
  logic [CFG_W-1:0]    img;

  soft_logic_block #(.FRACTURABLE(FRAC), .ADDER_ARCH(ARCH)) dut (
    .clk(clk), .rst_n(rst_n), .cfg_en(cfg_en), .cfg_in(cfg_in), .cfg_out(cfg_out),
    .gen_in(gen_in), .cin(cin), .out(out), .cout(cout)
  );

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL [FRAC=%0d ARCH=%0d] %s: got %0d expected %0d", FRAC, ARCH, what, got, exp);
    end
  endtask

  function automatic int sel_gen(int e, int g);
    if (g / 10 == e / 2) return g % 10;
    return 10 + g % 10;   // callers only use the own or the next group
  endfunction

  function automatic void clear_image();
    img = '0;
    for (int i = 0; i < N_BLE * K; i++) img[i*SW +: SW] = SW'(UNUSED);
  endfunction

  function automatic void set_pin(int e, int p, int sel);
    img[(e*K + p)*SW +: SW] = SW'(sel);
  endfunction

  // Element record from its truth table and mode bits.
  function automatic void set_elem(int e, logic [63:0] lut, logic add, logic reg_out,
                                   logic fb_en);
    if (FRAC) begin
      fble_cfg_t c = '0;
      c.lut = lut; c.frac = 1'b1; c.adder_en = add; c.reg_out = {1'b0, reg_out};
      img[XBAR_W + e*ELEM_W +: ELEM_W] = ELEM_W'(c);
    end else begin
      ble_cfg_t c = '0;
      c.lut = lut; c.adder_en = add; c.reg_out = reg_out; c.fb_en = fb_en;
      img[XBAR_W + e*ELEM_W +: ELEM_W] = ELEM_W'(c);
    end
  endfunction

  task automatic load();
    @(negedge clk);
    rst_n = 1'b0; cfg_en = 1'b1;
    for (int i = CFG_W - 1; i >= 0; i--) begin
      cfg_in = img[i];
      @(negedge clk);
    end
    cfg_en = 1'b0; rst_n = 1'b1;
  endtask

  function automatic int ga(int e); return 10 * (e / 2) + 2 * (e % 2);     endfunction
  function automatic int gb(int e); return 10 * (e / 2) + 2 * (e % 2) + 1; endfunction

  function automatic logic [7:0] sum_bits();
    logic [7:0] s;
    for (int e = 0; e < N_BLE; e++) s[e] = out[FB*e];
    return s;
  endfunction

  task automatic drive_operands(logic [7:0] a, logic [7:0] b);
    gen_in = '0;
    for (int e = 0; e < N_BLE; e++) begin
      gen_in[ga(e)] = a[e];
      gen_in[gb(e)] = b[e];
    end
  endtask

  initial begin
    checks = 0; failures = 0; done = 1'b0;

    // 8-bit hard addition: operand a = LUT half A = pin 0, b = half B = pin 1
    clear_image();
    for (int e = 0; e < N_BLE; e++) begin
      set_pin(e, 0, sel_gen(e, ga(e)));
      set_pin(e, 1, sel_gen(e, gb(e)));
      set_elem(e, {32'hCCCC_CCCC, 32'hAAAA_AAAA}, 1'b1, 1'b0, 1'b0);
    end
    load();
    for (int i = 0; i < 100; i++) begin
      logic [7:0] a, b;
      logic c;
      a = 8'($urandom); b = 8'($urandom); c = 1'($urandom);
      if (i == 0) begin a = 8'hFF; b = 8'h00; c = 1'b1; end
      drive_operands(a, b); cin = c;
      #1;
      expect_eq({cout, sum_bits()}, 9'(a) + 9'(b) + 9'(c), "hard add");
    end

    // 7-bit subtraction with a dummy adder bit in element 0 (operands 1, 1)
    clear_image();
    set_elem(0, '1, 1'b1, 1'b0, 1'b0);
    for (int e = 1; e < N_BLE; e++) begin
      set_pin(e, 0, sel_gen(e, ga(e)));
      set_pin(e, 1, sel_gen(e, gb(e)));
      set_elem(e, {32'h3333_3333, 32'hAAAA_AAAA}, 1'b1, 1'b0, 1'b0);
    end
    load();
    cin = 1'b0;
    for (int i = 0; i < 100; i++) begin
      logic [6:0] a, b, d;
      a = 7'($urandom); b = 7'($urandom);
      drive_operands({a, 1'b0}, {b, 1'b0});
      #1;
      d = a - b;
      expect_eq(32'(sum_bits() >> 1), 32'(d), "dummy-started subtract");
      expect_eq(32'(cout), 32'(a >= b), "subtract no-borrow");
    end

    // registered toggle: table NOT(in0); in0 from the element's own register
    clear_image();
    if (FRAC) begin
      set_pin(2, 0, 20);                       // crossbar feedback of element 2 output 0
      set_elem(2, {32'h0, 32'h5555_5555}, 1'b0, 1'b1, 1'b0);
    end else begin
      set_elem(2, {32'h5555_5555, 32'h5555_5555}, 1'b0, 1'b1, 1'b1);  // fast local path
    end
    load();
    begin
      logic prev;
      prev = out[FB*2];
      expect_eq(32'(prev), 0, "toggle after reset");
      for (int i = 0; i < 10; i++) begin
        @(negedge clk);
        expect_eq(32'(out[FB*2]), 32'(!prev), "toggle");
        prev = out[FB*2];
      end
    end

    done = 1'b1;
  end
endmodule
