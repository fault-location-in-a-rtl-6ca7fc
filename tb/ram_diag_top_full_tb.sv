// Full-size testbench for ram_diag_top at its default size: q = 4 rows and
// W = 8 columns of 64x64-bit chips (N = 4096, 16 Kbyte).  One complete
// diagnosis of a unit with a stuck address line in chip row 1 and a faulty
// chip in each of rows 0, 2 and 3 (at most q-1 rows, one chip per row).
// The address line must be reported and repaired before the chip tests,
// then exactly the three chips must be reported.  Checks the length of the
// chip tests, (3 * 64 + 32) * N = 224N writes and as many reads per row,
// and reports the cycles of the whole diagnosis.
module ram_diag_top_full_tb;
  import ram_diag_pkg::*;
  localparam int Q = 4, W = 8, P = 6, N = 4096;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, resume, repair_req, done;
  stage_e stage;
  logic [W-1:0] i0, i1, sa0, sa1;
  logic [Q-1:0] ics, csf;
  logic [Q-1:0][2*P-1:0] ia0, ia1, af;
  chip_fault_t cf [Q][W];
  logic [Q-1:0][W-1:0] bad, cdc, ce, capi;
  logic [31:0] acc;
  longint cycles = 0;
  int repairs = 0;

  ram_diag_top dut (.clk(clk), .rst_n(rst_n), .start(start), .resume(resume),
    .repair_req(repair_req), .done(done), .stage(stage),
    .inj_d_sa0(i0), .inj_d_sa1(i1), .inj_cs_sa1(ics), .inj_a_sa0(ia0), .inj_a_sa1(ia1), .inj_chip(cf),
    .d_sa0(sa0), .d_sa1(sa1), .cs_fault(csf), .a_fault(af), .chip_bad(bad), .chip_dc(cdc),
    .chip_e(ce), .chip_api(capi), .chip_accesses(acc));

  initial begin
    repeat (9000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    start = 0; resume = 0; i0 = '0; i1 = '0; ics = '0; ia0 = '0; ia1 = '0;
    foreach (cf[r, c]) cf[r][c] = '{kind: CF_NONE, val: 0, row: 0, col: 0};
    ia1[1] = 12'b0000_0100_0000;
    cf[0][1] = '{kind: CF_CELL_SA, val: 0, row: 33, col: 17};
    cf[2][4] = '{kind: CF_API, val: 0, row: 40, col: 21};
    cf[3][7] = '{kind: CF_COL_SA0, val: 0, row: 0, col: 50};
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) begin
      if (repair_req) begin
        repairs++;
        chk(af[1] == 12'b0000_0100_0000 && af[0] == 0 && af[2] == 0 && af[3] == 0, "address line located");
        ia1 = '0;
        @(negedge clk) resume = 1;
        @(negedge clk) resume = 0;
      end else @(negedge clk);
      cycles++;
    end
    chk(repairs == 1, "one repair stop");
    chk(sa0 == 0 && sa1 == 0 && csf == 0, "no D or CS fault");
    chk(bad[0] == 8'b0000_0010 && bad[1] == 0 && bad[2] == 8'b0001_0000 && bad[3] == 8'b1000_0000, "faulty chips located");
    chk(ce[0][1] && capi[2][4] && cdc[3][7], "each chip caught by its test");
    chk(acc == 32'(Q * 2 * 224 * N), $sformatf("chip test accesses %0d", acc));
    $display("diagnosis took %0d cycles", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
