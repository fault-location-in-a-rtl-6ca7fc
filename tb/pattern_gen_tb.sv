// Testbench for pattern_gen with 4x4 (P = 2) and 16x16 (P = 4) arrays.
// For every i / j / assignment it walks the whole sequence and checks:
// every address is visited exactly once; `last` comes on element N-1 only;
// DC: the 1 is on (i,i) and is the first element; E: the 1s are exactly the
// cells with column = row + j (mod 2^P), as in the j-th pattern table;
// API: each cell gets the letter of the 3x3 block tiling.  For P = 2 the
// whole DC and E images are also compared with the published 4x4 examples
// (the stored words of the four decoder-test iterations, and the j = 0..3
// patterns of the extended-fault test), written row 0 first.
module pattern_gen_tb;
  import ram_diag_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start2, step2, bit2, last2;
  logic start4, step4, bit4, last4;
  pat_mode_e mode;
  logic [3:0] sel;
  logic [8:0] asg;
  logic [3:0] addr2;
  logic [7:0] addr4;

  pattern_gen #(.P(2)) g2 (.clk(clk), .rst_n(rst_n), .start(start2), .mode(mode), .sel(sel[1:0]),
                           .assign_val(asg), .step(step2), .addr(addr2), .bit_o(bit2), .last(last2));
  pattern_gen #(.P(4)) g4 (.clk(clk), .rst_n(rst_n), .start(start4), .mode(mode), .sel(sel),
                           .assign_val(asg), .step(step4), .addr(addr4), .bit_o(bit4), .last(last4));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // 4x4 images, row 0 in the top nibble, column 0 in each nibble's MSB
  localparam logic [15:0] DC_IMG [4] = '{16'b1000_0000_0000_0000, 16'b0000_0100_0000_0000,
                                         16'b0000_0000_0010_0000, 16'b0000_0000_0000_0001};
  localparam logic [15:0] E_IMG  [4] = '{16'b1000_0100_0010_0001, 16'b0100_0010_0001_1000,
                                         16'b0010_0001_1000_0100, 16'b0001_1000_0100_0010};

  task automatic run(input int p, input pat_mode_e m, input int s_val, input logic [8:0] a);
    int s, n, r, c;
    logic b, l;
    int ad;
    bit seen [256];
    logic [15:0] img;
    s = 1 << p; n = s * s;
    foreach (seen[k]) seen[k] = 0;
    img = '0;
    mode = m; sel = 4'(s_val); asg = a;
    @(negedge clk);
    start2 = (p == 2); start4 = (p == 4);
    @(negedge clk);
    start2 = 0; start4 = 0;
    for (int k = 0; k < n; k++) begin
      ad = (p == 2) ? int'(addr2) : int'(addr4);
      b  = (p == 2) ? bit2 : bit4;
      l  = (p == 2) ? last2 : last4;
      r = ad / s; c = ad % s;
      chk(!seen[ad], $sformatf("p=%0d mode=%0d sel=%0d address %0d twice", p, m, s_val, ad));
      seen[ad] = 1;
      if (p == 2) img[15 - ad] = b;
      chk(l == (k == n - 1), $sformatf("p=%0d mode=%0d last at k=%0d", p, m, k));
      unique case (m)
        PM_DC: begin
          chk(b == (r == s_val && c == s_val), $sformatf("DC p=%0d i=%0d cell (%0d,%0d) bit %0d", p, s_val, r, c, b));
          if (k == 0) chk(r == s_val && c == s_val, "DC starts at (i,i)");
        end
        PM_E:  chk(b == (c == (r + s_val) % s), $sformatf("E p=%0d j=%0d cell (%0d,%0d) bit %0d", p, s_val, r, c, b));
        default: chk(b == a[8 - ((r % 3) * 3 + (c % 3))], $sformatf("API p=%0d cell (%0d,%0d)", p, r, c));
      endcase
      step2 = (p == 2); step4 = (p == 4);
      @(negedge clk);
      step2 = 0; step4 = 0;
    end
    if (p == 2 && m == PM_DC) chk(img == DC_IMG[s_val], $sformatf("DC i=%0d image %b", s_val, img));
    if (p == 2 && m == PM_E)  chk(img == E_IMG[s_val],  $sformatf("E j=%0d image %b", s_val, img));
  endtask

  initial begin
    start2 = 0; start4 = 0; step2 = 0; step4 = 0; mode = PM_DC; sel = 0; asg = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4; i++) run(2, PM_DC, i, 0);
    for (int j = 0; j < 4; j++) run(2, PM_E, j, 0);
    for (int l = 0; l < 32; l++) run(2, PM_API, 0, API_ASSIGN[l]);
    for (int i = 0; i < 16; i += 5) run(4, PM_DC, i, 0);
    for (int j = 0; j < 16; j += 3) run(4, PM_E, j, 0);
    for (int l = 0; l < 32; l += 7) run(4, PM_API, 0, API_ASSIGN[l]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
