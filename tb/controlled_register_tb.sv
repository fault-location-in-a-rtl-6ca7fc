// Testbench for controlled_register.  Loads several block assignments and
// triggers it once per storage element of a 2^P x 2^P array (P = 2, 4, 6).
// After k triggers the output must be the assignment letter that the 3x3
// block tiling puts on element (k / 2^P, k mod 2^P): row r mod 3 of the
// block, column c mod 3 (this tiling is exact for even P, where 2^P - 1 is
// a multiple of 3).
module controlled_register_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       load2, trg2, ob2;
  logic       load4, trg4, ob4;
  logic       load6, trg6, ob6;
  logic [8:0] lv;

  controlled_register #(.P(2)) d2 (.clk(clk), .rst_n(rst_n), .load(load2), .load_val(lv), .trg(trg2), .obit(ob2));
  controlled_register #(.P(4)) d4 (.clk(clk), .rst_n(rst_n), .load(load4), .load_val(lv), .trg(trg4), .obit(ob4));
  controlled_register #(.P(6)) d6 (.clk(clk), .rst_n(rst_n), .load(load6), .load_val(lv), .trg(trg6), .obit(ob6));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // letters as printed A..I -> bit 8..0 of `printed`
  function automatic logic letter(input logic [8:0] printed, input int r, input int c);
    return printed[8 - ((r % 3) * 3 + (c % 3))];
  endfunction

  task automatic run(input int p, input logic [8:0] printed);
    int s;
    logic o;
    s = 1 << p;
    // register order is {I,H,G,F,E,D,C,B,A}
    for (int b = 0; b < 9; b++) lv[b] = printed[8 - b];
    @(negedge clk);
    load2 = (p == 2); load4 = (p == 4); load6 = (p == 6);
    @(negedge clk);
    load2 = 0; load4 = 0; load6 = 0;
    for (int k = 0; k < s * s; k++) begin
      o = (p == 2) ? ob2 : (p == 4) ? ob4 : ob6;
      checks++;
      if (o !== letter(printed, k / s, k % s)) begin
        failures++;
        if (failures < 10) $display("FAIL p=%0d assign=%b k=%0d out=%b", p, printed, k, o);
      end
      trg2 = (p == 2); trg4 = (p == 4); trg6 = (p == 6);
      @(negedge clk);
      trg2 = 0; trg4 = 0; trg6 = 0;
    end
  endtask

  initial begin
    load2 = 0; load4 = 0; load6 = 0; trg2 = 0; trg4 = 0; trg6 = 0; lv = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(2, 9'b100_010_001);
    run(2, 9'b101_001_010);
    run(4, 9'b110_101_001);
    run(4, 9'b011_111_011);
    run(6, 9'b001_010_110);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
