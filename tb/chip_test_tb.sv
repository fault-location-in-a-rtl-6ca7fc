// Testbench for chip_test on a RAM unit of 4x4-bit chips (P = 2), W = 4,
// q = 2, as in the decoder-test example.  Chip f of a row is data bit W-f.
// Run 1, row 1: chip 1 has a cell stuck at 0 on the diagonal, chips 2 and 3
// have row line 3 stuck at 1 (never selected), chip 4 is good: all three
// tests must report chips 1-3 and only them.  Run 2, row 0: a decoder
// fault, a column line stuck at 0, an extended fault and an adjacent-
// pattern fault; each must be reported by the tests that can see it (the
// decoder test cannot see the last two, which lie off the diagonal it
// writes).  Row 1 of run 2 and row 0 of run 1 are clean.  Checks the count
// of accesses, 2 * (3 * 2^P + 32) * N, and the cycles, 2N + 3 per pattern plus the start cycle.
// Also checks that the 32 block assignments give all 32 values to every
// element and its four neighbours in the 3x3 block.
module chip_test_tb;
  import ram_diag_pkg::*;
  localparam int Q = 2, W = 4, P = 2, S = 1 << P, N = S * S;
  localparam int PATTERNS = 3 * S + 32;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, done, req, we;
  logic [0:0] row, trow;
  logic [2*P-1:0] addr;
  logic [W-1:0] wd, rd, dc, e, api;
  logic [31:0] acc;
  chip_fault_t cf [Q][W];
  logic [Q-1:0][2*P-1:0] az;

  chip_test #(.Q(Q), .W(W), .P(P)) dut (.clk(clk), .rst_n(rst_n), .start(start), .row(trow), .done(done),
    .mem_req(req), .mem_we(we), .mem_row(row), .mem_addr(addr), .mem_wdata(wd), .mem_rdata(rd),
    .dc_fail(dc), .e_fail(e), .api_fail(api), .accesses(acc));
  ram_unit #(.Q(Q), .W(W), .P(P)) mem (.clk(clk), .req(req), .we(we), .row(row), .addr(addr),
    .wdata(wd), .rdata(rd), .d_sa0('0), .d_sa1('0), .cs_sa1('0), .a_sa0(az), .a_sa1(az), .chip_fault(cf));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // care: which chips the expectation covers
  task automatic run(input int r, input logic [W-1:0] edc, input logic [W-1:0] ee,
                     input logic [W-1:0] eapi, input logic [W-1:0] api_care);
    int cyc;
    trow = 1'(r);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    chk(dc === edc, $sformatf("row %0d decoder test %b expected %b", r, dc, edc));
    chk(e === ee, $sformatf("row %0d extended test %b expected %b", r, e, ee));
    chk((api & api_care) === (eapi & api_care), $sformatf("row %0d API test %b expected %b", r, api, eapi));
    chk(acc == 2 * PATTERNS * N, $sformatf("accesses %0d", acc));
    chk(cyc == PATTERNS * (2 * N + 3) + 1, $sformatf("cycles %0d", cyc));
  endtask

  initial begin
    // assignment coverage: top, left, self, right, bottom of each element
    string nb [9] = '{"GCABD", "HABCE", "IBCAF", "AFDEG", "BDEFH", "CEFDI", "DIGHA", "EGHIB", "FHIGC"};
    for (int k = 0; k < 9; k++) begin
      bit seen [32];
      foreach (seen[v]) seen[v] = 0;
      for (int l = 0; l < N_ASSIGN; l++) begin
        int v = 0;
        for (int q = 0; q < 5; q++) v = v * 2 + int'(API_ASSIGN[l][8 - (nb[k][q] - "A")]);
        seen[v] = 1;
      end
      chk(seen.sum() with (int'(item)) == 32, $sformatf("assignments cover element %0d", k));
    end
  end

  initial begin
    start = 0; trow = 0; az = '0;
    foreach (cf[r, c]) cf[r][c] = '{kind: CF_NONE, val: 0, row: 0, col: 0};
    cf[1][3] = '{kind: CF_CELL_SA, val: 0, row: 1, col: 1};   // chip 1
    cf[1][2] = '{kind: CF_ROW_SA1, val: 0, row: 3, col: 0};   // chip 2
    cf[1][1] = '{kind: CF_ROW_SA1, val: 0, row: 3, col: 0};   // chip 3
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(1, 4'b1110, 4'b1110, 4'b1110, 4'b1111);
    run(0, 4'b0000, 4'b0000, 4'b0000, 4'b1111);
    foreach (cf[r, c]) cf[r][c] = '{kind: CF_NONE, val: 0, row: 0, col: 0};
    cf[0][3] = '{kind: CF_DEC_ALIAS, val: 0, row: 1, col: 2};
    cf[0][2] = '{kind: CF_COL_SA0, val: 0, row: 0, col: 0};
    cf[0][1] = '{kind: CF_EXT, val: 0, row: 2, col: 1};
    cf[0][0] = '{kind: CF_API, val: 1, row: 1, col: 1};
    run(0, 4'b1100, 4'b1111, 4'b1101, 4'b1101);
    run(1, 4'b0000, 4'b0000, 4'b0000, 4'b1111);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
