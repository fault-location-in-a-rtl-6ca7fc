// End-to-end testbench for ram_diag_top at q = 4, W = 8, P = 4 (16x16-bit
// chips).  Runs complete diagnoses, each with one kind of cable fault
// (plus chip faults, which must not disturb the cable tests) or with chip
// faults only, repairs by clearing the injected cable faults when asked,
// and checks every located line and chip.  Counts each mechanism of the
// design and fails if one never happened: repair stops after the D, CS and
// A tests, lines found stuck at 0 and at 1, a CS and an A test that read
// through a faulty chip (code correction), and chips caught by the decoder,
// extended and adjacent-pattern tests.  Checks the length of the RAM chip
// tests: 2 * (3 * 2^P + 32) * N accesses per row.
module ram_diag_top_tb;
  import ram_diag_pkg::*;
  localparam int Q = 4, W = 8, P = 4, N = 1 << (2 * P);
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

  ram_diag_top #(.Q(Q), .W(W), .P(P)) dut (.clk(clk), .rst_n(rst_n), .start(start), .resume(resume),
    .repair_req(repair_req), .done(done), .stage(stage),
    .inj_d_sa0(i0), .inj_d_sa1(i1), .inj_cs_sa1(ics), .inj_a_sa0(ia0), .inj_a_sa1(ia1), .inj_chip(cf),
    .d_sa0(sa0), .d_sa1(sa1), .cs_fault(csf), .a_fault(af), .chip_bad(bad), .chip_dc(cdc),
    .chip_e(ce), .chip_api(capi), .chip_accesses(acc));

  int n_rep_d = 0, n_rep_cs = 0, n_rep_a = 0, n_d0 = 0, n_d1 = 0, n_cs = 0, n_a0 = 0, n_a1 = 0;
  int n_corr_cs = 0, n_corr_a = 0, n_dc = 0, n_e = 0, n_api = 0;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic clear_chips();
    foreach (cf[r, c]) cf[r][c] = '{kind: CF_NONE, val: 0, row: 0, col: 0};
  endtask

  task automatic diagnose();
    stage_e prev_stage;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    prev_stage = ST_IDLE;
    while (!done) begin
      if (repair_req) begin
        if (prev_stage == ST_D)  n_rep_d++;
        if (prev_stage == ST_CS) n_rep_cs++;
        if (prev_stage == ST_A)  n_rep_a++;
        i0 = '0; i1 = '0; ics = '0; ia0 = '0; ia1 = '0;
        repeat (2) @(negedge clk);
        resume = 1;
        @(negedge clk) resume = 0;
      end else begin
        prev_stage = stage;
        @(negedge clk);
      end
    end
    chk(acc == 32'(Q * 2 * (3 * (1 << P) + 32) * N), $sformatf("chip test accesses %0d", acc));
  endtask

  initial begin
    start = 0; resume = 0; i0 = '0; i1 = '0; ics = '0; ia0 = '0; ia1 = '0;
    clear_chips();
    repeat (2) @(negedge clk);
    rst_n = 1;

    // 1. fault-free unit
    diagnose();
    chk(sa0 == 0 && sa1 == 0 && csf == 0 && af == 0 && bad == 0, "fault-free unit reports nothing");

    // 2. data lines d_1 stuck at 0, d_5 stuck at 1; a faulty chip in row 2
    i0 = 8'b1000_0000; i1 = 8'b0000_1000;
    cf[2][6] = '{kind: CF_CELL_SA, val: 1, row: 0, col: 0};
    diagnose();
    chk(sa0 == 8'b1000_0000 && sa1 == 8'b0000_1000, "D lines located");
    if (sa0 != 0) n_d0++;
    if (sa1 != 0) n_d1++;
    chk(csf == 0 && af == 0, "no CS or A fault after D repair");
    chk(bad[2] == 8'b0100_0000 && bad[0] == 0 && bad[1] == 0 && bad[3] == 0, "chip of row 2 located");
    if (cdc[2][6]) n_dc++;

    // 3. s_1 stuck at 1; a chip faulty at the test location in row 3
    clear_chips();
    ics = 4'b0010;
    cf[3][0] = '{kind: CF_ROW_SA1, val: 0, row: 0, col: 0};
    diagnose();
    chk(csf == 4'b0010, "CS line located");
    if (csf != 0) n_cs++;
    if (csf[3] == 0) n_corr_cs++;
    chk(af == 0 && sa0 == 0 && sa1 == 0, "no other cable fault");
    chk(bad[3] == 8'b0000_0001 && cdc[3] == 8'b0000_0001, "row line fault found by decoder test");
    if (cdc[3][0]) n_dc++;

    // 4. address lines: row 0 bit 5 stuck at 0, row 2 bit 0 stuck at 1;
    //    a faulty chip in row 1
    clear_chips();
    ia0[0] = 8'b0010_0000; ia1[2] = 8'b0000_0001;
    cf[1][3] = '{kind: CF_COL_SA1, val: 0, row: 0, col: 0};
    diagnose();
    chk(af[0] == 8'b0010_0000 && af[2] == 8'b0000_0001 && af[1] == 0 && af[3] == 0, "A lines located");
    if (af[0] != 0) n_a0++;
    if (af[2] != 0) n_a1++;
    if (af[1] == 0) n_corr_a++;
    chk(csf == 0, "no CS fault");
    chk(bad[1] == 8'b0000_1000 && bad[0] == 0 && bad[2] == 0 && bad[3] == 0, "chip of row 1 located");

    // 5. chip faults only, one chip in each of rows 0, 1, 3
    clear_chips();
    cf[0][7] = '{kind: CF_EXT, val: 1, row: 5, col: 9};
    cf[1][2] = '{kind: CF_API, val: 1, row: 7, col: 7};
    cf[3][5] = '{kind: CF_DEC_ALIAS, val: 0, row: 4, col: 11};
    diagnose();
    chk(sa0 == 0 && sa1 == 0 && csf == 0 && af == 0, "no cable fault");
    chk(bad[0] == 8'b1000_0000 && bad[1] == 8'b0000_0100 && bad[2] == 0 && bad[3] == 8'b0010_0000, "chips located");
    chk(ce[0][7] && capi[1][2] && cdc[3][5], "each chip caught by its test");
    if (ce[0][7]) n_e++;
    if (capi[1][2]) n_api++;
    if (cdc[3][5]) n_dc++;

    $display("mechanisms: repair D=%0d CS=%0d A=%0d; D s-a-0=%0d s-a-1=%0d; CS=%0d; A s-a-0=%0d s-a-1=%0d; corrected CS=%0d A=%0d; chip DC=%0d E=%0d API=%0d",
             n_rep_d, n_rep_cs, n_rep_a, n_d0, n_d1, n_cs, n_a0, n_a1, n_corr_cs, n_corr_a, n_dc, n_e, n_api);
    chk(n_rep_d > 0, "repair stop after D");
    chk(n_rep_cs > 0, "repair stop after CS");
    chk(n_rep_a > 0, "repair stop after A");
    chk(n_d0 > 0 && n_d1 > 0, "D lines stuck at 0 and 1");
    chk(n_cs > 0, "CS line");
    chk(n_a0 > 0 && n_a1 > 0, "A lines stuck at 0 and 1");
    chk(n_corr_cs > 0 && n_corr_a > 0, "code correction");
    chk(n_dc > 0 && n_e > 0 && n_api > 0, "chip tests");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
