// tb_carry_link_adder: adder microbenchmark across two clusters.
//
// Two default clusters are joined by the dedicated carry link (cout of
// cluster 0 to cin of cluster 1) and by the configuration chain (cfg_out
// of cluster 0 to cfg_in of cluster 1), so one 1600-bit image configures
// both. Two mappings are loaded in turn and checked against integer
// arithmetic:
//   add16  16-bit a + b + cin, the carry entering on cluster 0's cin pin
//   sub15  15-bit a - b, started by a dummy adder bit (operands 1, 1) in
//          element 0 of cluster 0, with operand b inverted in the LUTs
// The carry-out of cluster 1 is the 17th sum bit or the no-borrow flag.
module tb_carry_link_adder;
  import fpga_pkg::*;

  localparam int SW     = 5;
  localparam int XBAR_W = N_BLE * K * SW;
  localparam int ELEM_W = $bits(fble_cfg_t);
  localparam int CFG_W  = XBAR_W + N_BLE * ELEM_W;
  localparam int UNUSED = 31;

  logic               clk = 1'b0, rst_n = 1'b0, cfg_en = 1'b0, cfg_in = 1'b0, cin = 1'b0;
  logic               cfg_mid, cfg_end, carry_link, cout;
  logic [N_GEN_IN-1:0] gen [2];
  logic [2*N_BLE-1:0]  out [2];
  logic [CFG_W-1:0]    img [2];
  int checks = 0, failures = 0;

  soft_logic_block u_c0 (
    .clk(clk), .rst_n(rst_n), .cfg_en(cfg_en), .cfg_in(cfg_in), .cfg_out(cfg_mid),
    .gen_in(gen[0]), .cin(cin), .out(out[0]), .cout(carry_link)
  );
  soft_logic_block u_c1 (
    .clk(clk), .rst_n(rst_n), .cfg_en(cfg_en), .cfg_in(cfg_mid), .cfg_out(cfg_end),
    .gen_in(gen[1]), .cin(carry_link), .out(out[1]), .cout(cout)
  );

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Operand bits of element e sit on general inputs of the element pair's own group.
  function automatic int ga(int e); return 10 * (e / 2) + 2 * (e % 2);     endfunction
  function automatic int gb(int e); return 10 * (e / 2) + 2 * (e % 2) + 1; endfunction

  // Element records: adder bit with halves A and B given as 32-bit tables.
  function automatic fble_cfg_t adder_elem(logic [31:0] ta, logic [31:0] tb_);
    fble_cfg_t c = '0;
    c.lut = {tb_, ta}; c.frac = 1'b1; c.adder_en = 1'b1;
    return c;
  endfunction

  // Bit i of the wide adder lives in cluster i/8, element i%8.
  function automatic void map_adder(bit dummy_start);
    for (int cl = 0; cl < 2; cl++) begin
      img[cl] = '0;
      for (int i = 0; i < N_BLE * K; i++) img[cl][i*SW +: SW] = SW'(UNUSED);
      for (int e = 0; e < N_BLE; e++) begin
        fble_cfg_t c;
        img[cl][(e*K + 0)*SW +: SW] = SW'(ga(e) % 10);
        img[cl][(e*K + 1)*SW +: SW] = SW'(gb(e) % 10);
        if (dummy_start && cl == 0 && e == 0) c = adder_elem('1, '1);          // constant 1, 1
        else if (dummy_start)                  c = adder_elem(32'hAAAA_AAAA, 32'h3333_3333);  // a, NOT b
        else                                   c = adder_elem(32'hAAAA_AAAA, 32'hCCCC_CCCC);  // a, b
        img[cl][XBAR_W + e*ELEM_W +: ELEM_W] = c;
      end
    end
  endfunction

  // Cluster 1's image goes in first: it travels through cluster 0's chain.
  task automatic load();
    logic [2*CFG_W-1:0] both = {img[1], img[0]};
    @(negedge clk);
    rst_n = 1'b0; cfg_en = 1'b1;
    for (int i = 2*CFG_W - 1; i >= 0; i--) begin
      cfg_in = both[i];
      @(negedge clk);
    end
    cfg_en = 1'b0; rst_n = 1'b1;
  endtask

  task automatic drive(logic [15:0] a, logic [15:0] b);
    gen[0] = '0; gen[1] = '0;
    for (int i = 0; i < 16; i++) begin
      gen[i/8][ga(i%8)] = a[i];
      gen[i/8][gb(i%8)] = b[i];
    end
  endtask

  function automatic logic [15:0] sums();
    logic [15:0] s;
    for (int i = 0; i < 16; i++) s[i] = out[i/8][2*(i%8)];
    return s;
  endfunction

  initial begin
    int n_add = 0, n_sub = 0, n_link = 0;
    gen[0] = '0; gen[1] = '0;

    map_adder(1'b0);
    load();
    for (int i = 0; i < 300; i++) begin
      logic [15:0] a, b;
      logic c;
      logic [16:0] exp;
      a = 16'($urandom); b = 16'($urandom); c = 1'($urandom);
      if (i == 0) begin a = 16'hFFFF; b = 16'h0000; c = 1'b1; end   // carry through both clusters
      drive(a, b); cin = c;
      #1;
      exp = 17'(a) + 17'(b) + 17'(c);
      expect_eq({cout, sums()}, exp, "add16");
      expect_eq(32'(carry_link), 32'((9'(a[7:0]) + 9'(b[7:0]) + 9'(c)) >> 8), "carry link");
      if (carry_link) n_link++;
      n_add++;
    end

    map_adder(1'b1);
    load();
    cin = 1'b0;
    for (int i = 0; i < 300; i++) begin
      logic [14:0] a, b, d;
      a = 15'($urandom); b = 15'($urandom);
      if (i == 0) b = a;
      drive({a, 1'b0}, {b, 1'b0});
      #1;
      d = a - b;
      expect_eq(32'(sums() >> 1), 32'(d), "sub15 difference");
      expect_eq(32'(cout), 32'(a >= b), "sub15 no-borrow");
      n_sub++;
    end

    $display("add16 %0d, sub15 %0d, carries over the link %0d", n_add, n_sub, n_link);
    checks++;
    if (n_link == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
