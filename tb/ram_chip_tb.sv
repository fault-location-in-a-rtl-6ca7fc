// Testbench for ram_chip, P = 3 (8 x 8 array).  A reference model in this
// file decides, for every address, which storage elements the row and
// column lines select (with the injected line or decoder fault), stores a
// write in all of them, and reads the wired AND of the selected elements
// (1 when none), with the faulty cell's forced value where its condition
// holds.  Random writes and reads are compared with the chip for each
// fault kind in turn, and a deselected chip must output 1.
module ram_chip_tb;
  import ram_diag_pkg::*;
  localparam int P = 3;
  localparam int S = 1 << P;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic cs_n, we, din, z;
  logic [2*P-1:0] addr;
  chip_fault_t f;
  logic model [S][S];

  ram_chip #(.P(P)) dut (.clk(clk), .cs_n(cs_n), .we(we), .addr(addr), .din(din), .z(z), .fault(f));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit row_on(int r, int i);
    bit on = (r == i);
    if (f.kind == CF_ROW_SA0 && r == int'(f.row)) on = 1;
    if (f.kind == CF_ROW_SA1 && r == int'(f.row)) on = 0;
    if (f.kind == CF_DEC_ALIAS && i == int'(f.row) && r == int'(f.col)) on = 1;
    return on;
  endfunction
  function automatic bit col_on(int c, int j);
    bit on = (c == j);
    if (f.kind == CF_COL_SA0 && c == int'(f.col)) on = 1;
    if (f.kind == CF_COL_SA1 && c == int'(f.col)) on = 0;
    return on;
  endfunction
  function automatic logic cell_val(int r, int c);
    int fr = int'(f.row), fc = int'(f.col);
    bit cond = 0;
    if (r == fr && c == fc) begin
      if (f.kind == CF_CELL_SA) cond = 1;
      if (f.kind == CF_EXT) begin
        cond = 1;
        for (int k = 0; k < S; k++) begin
          if (k != fr && model[k][fc] != f.val) cond = 0;
          if (k != fc && model[fr][k] != f.val) cond = 0;
        end
      end
      if (f.kind == CF_API) begin
        cond = 1;
        if (fr > 0     && model[fr-1][fc] != f.val) cond = 0;
        if (fr < S - 1 && model[fr+1][fc] != f.val) cond = 0;
        if (fc > 0     && model[fr][fc-1] != f.val) cond = 0;
        if (fc < S - 1 && model[fr][fc+1] != f.val) cond = 0;
      end
    end
    return cond ? f.val : model[r][c];
  endfunction

  task automatic op(input bit wr, input int i, input int j, input logic d);
    logic exp;
    @(negedge clk);
    cs_n = 0; we = wr; addr = (2*P)'(i * S + j); din = d;
    exp = 1;
    for (int r = 0; r < S; r++)
      for (int c = 0; c < S; c++)
        if (row_on(r, i) && col_on(c, j)) exp &= cell_val(r, c);
    @(negedge clk);
    cs_n = 1; we = 0;
    if (wr) begin
      for (int r = 0; r < S; r++)
        for (int c = 0; c < S; c++)
          if (row_on(r, i) && col_on(c, j)) model[r][c] = d;
    end else begin
      checks++;
      if (z !== exp) begin
        failures++;
        if (failures < 20) $display("FAIL kind=%0d read (%0d,%0d) z=%b exp=%b", f.kind, i, j, z, exp);
      end
    end
  endtask

  task automatic scenario(input chip_fault_kind_e k, input logic v, input int fr, input int fc);
    f = '{kind: k, val: v, row: MAX_P'(fr), col: MAX_P'(fc)};
    // fill: with line faults some writes land twice, so fill until settled
    for (int r = 0; r < S; r++) for (int c = 0; c < S; c++) op(1, r, c, 1'($urandom));
    for (int n = 0; n < 600; n++) begin
      int r, c;
      r = $urandom_range(S - 1); c = $urandom_range(S - 1);
      // favour the faulty cell and its neighbourhood
      if (n % 3 == 0) begin r = fr + $urandom_range(2) - 1; c = fc + $urandom_range(2) - 1; end
      if (r < 0) r = 0; if (r >= S) r = S - 1; if (c < 0) c = 0; if (c >= S) c = S - 1;
      op(n % 2 == 0, r, c, (n % 5 == 0) ? v : 1'($urandom));
    end
  endtask

  initial begin
    cs_n = 1; we = 0; addr = 0; din = 0;
    f = '{kind: CF_NONE, val: 0, row: 0, col: 0};
    @(negedge clk);
    // unselected chip drives 1
    checks++;
    @(negedge clk);
    if (z !== 1'b1) failures++;
    scenario(CF_NONE, 0, 0, 0);
    scenario(CF_CELL_SA, 0, 2, 5);
    scenario(CF_CELL_SA, 1, 7, 0);
    scenario(CF_ROW_SA0, 0, 3, 0);
    scenario(CF_ROW_SA1, 0, 6, 0);
    scenario(CF_COL_SA0, 0, 0, 1);
    scenario(CF_COL_SA1, 0, 0, 4);
    scenario(CF_DEC_ALIAS, 0, 2, 6);
    scenario(CF_EXT, 0, 4, 4);
    scenario(CF_EXT, 1, 1, 2);
    scenario(CF_API, 1, 3, 3);
    scenario(CF_API, 0, 5, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
