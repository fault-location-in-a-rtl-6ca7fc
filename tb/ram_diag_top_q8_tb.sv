// Testbench for ram_diag_top at q = 8 chip rows, W = 8, 2p = 10 (32x32-bit
// chips): the size of the published data-line example.  One complete
// diagnosis of a unit that carries, at the same time, the faults of the
// three published cable examples and a faulty chip in seven of the eight
// rows:
//   - D:  d_1 stuck at 0, d_5 and d_7 stuck at 1;
//   - CS: s_0 and s_3 stuck at 1;
//   - A:  in chip row 0, lines a_2 and a_8 stuck at 0 and a_4 stuck at 1
//         (the published example also has a_12, which 2p = 10 lacks);
//   - chips: one chip in each of rows 1..7, one of each chip fault kind.
// The test bench repairs the lines of each cable when asked.  It checks
// that the diagnosis stops exactly three times, after the D, CS and A
// tests, that each stop reports exactly the injected lines, and that the
// chip tests then report exactly the seven faulty chips.
module ram_diag_top_q8_tb;
  import ram_diag_pkg::*;
  localparam int Q = 8, W = 8, P = 5, N = 1 << (2 * P);
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
  int repairs = 0;
  logic [W-1:0] want [Q];

  ram_diag_top #(.Q(Q), .W(W), .P(P)) dut (.clk(clk), .rst_n(rst_n), .start(start), .resume(resume),
    .repair_req(repair_req), .done(done), .stage(stage),
    .inj_d_sa0(i0), .inj_d_sa1(i1), .inj_cs_sa1(ics), .inj_a_sa0(ia0), .inj_a_sa1(ia1), .inj_chip(cf),
    .d_sa0(sa0), .d_sa1(sa1), .cs_fault(csf), .a_fault(af), .chip_bad(bad), .chip_dc(cdc),
    .chip_e(ce), .chip_api(capi), .chip_accesses(acc));

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

  // chip f of a row is data bit W-f
  function automatic logic [W-1:0] chip(input int f);
    return W'(1) << (W - f);
  endfunction

  initial begin
    start = 0; resume = 0; ia0 = '0; ia1 = '0;
    foreach (cf[r, c]) cf[r][c] = '{kind: CF_NONE, val: 0, row: 0, col: 0};
    i0 = chip(1);
    i1 = chip(5) | chip(7);
    ics = 8'b0000_1001;
    ia0[0] = 10'b00_1000_0010;
    ia1[0] = 10'b00_0000_1000;
    cf[1][chip_col(2)] = '{kind: CF_CELL_SA,   val: 1, row: 7,  col: 19};
    cf[2][chip_col(8)] = '{kind: CF_ROW_SA0,   val: 0, row: 12, col: 0};
    cf[3][chip_col(4)] = '{kind: CF_ROW_SA1,   val: 0, row: 0,  col: 0};
    cf[4][chip_col(6)] = '{kind: CF_COL_SA1,   val: 0, row: 0,  col: 30};
    cf[5][chip_col(1)] = '{kind: CF_DEC_ALIAS, val: 0, row: 5,  col: 9};
    cf[6][chip_col(3)] = '{kind: CF_EXT,       val: 1, row: 20, col: 11};
    cf[7][chip_col(7)] = '{kind: CF_API,       val: 0, row: 14, col: 25};
    want = '{0, chip(2), chip(8), chip(4), chip(6), chip(1), chip(3), chip(7)};
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) begin
      if (repair_req) begin
        repairs++;
        unique case (repairs)
          1: begin
            chk(stage == ST_REPAIR && sa0 == chip(1) && sa1 == (chip(5) | chip(7)), "data lines d_1 s-a-0, d_5 and d_7 s-a-1");
            i0 = '0; i1 = '0;
          end
          2: begin
            chk(csf == 8'b0000_1001, $sformatf("chip-select lines s_0 and s_3, got %b", csf));
            ics = '0;
          end
          3: begin
            chk(af[0] == 10'b00_1000_1010, $sformatf("address lines a_2, a_4, a_8 of row 0, got %b", af[0]));
            chk(af[7:1] == '0, "no address line in rows 1..7");
            ia0 = '0; ia1 = '0;
          end
          default: chk(0, "unexpected repair stop");
        endcase
        @(negedge clk) resume = 1;
        @(negedge clk) resume = 0;
      end else @(negedge clk);
    end
    chk(repairs == 3, $sformatf("three repair stops, got %0d", repairs));
    for (int r = 0; r < Q; r++)
      chk(bad[r] == want[r], $sformatf("row %0d faulty chips %b, expected %b", r, bad[r], want[r]));
    chk(acc == 32'(Q * 2 * (3 * (1 << P) + 32) * N), $sformatf("chip test accesses %0d", acc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int chip_col(input int f);
    return W - f;
  endfunction
endmodule
