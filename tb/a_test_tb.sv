// Testbench for a_test on a RAM unit with q = 4, W = 8, P = 6 (2p = 12
// address lines).  Cases: fault-free rows; the address example (lines of
// address bits 1, 3, 7 and 11 stuck in row 0, here two at 0 and two at 1);
// a single line stuck in row 2 while row 3 is clean; one faulty chip in the
// row (corrected by the code).  Also checks the length: done 3(2p+1)+1 cycles after start.
module a_test_tb;
  import ram_diag_pkg::*;
  localparam int Q = 4, W = 8, P = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, done, req, we;
  logic [1:0] row, trow;
  logic [2*P-1:0] addr, res;
  logic [W-1:0] wd, rd;
  logic [Q-1:0][2*P-1:0] a0, a1;
  chip_fault_t cf [Q][W];

  a_test #(.Q(Q), .W(W), .P(P)) dut (.clk(clk), .rst_n(rst_n), .start(start), .row(trow), .done(done),
    .mem_req(req), .mem_we(we), .mem_row(row), .mem_addr(addr), .mem_wdata(wd), .mem_rdata(rd),
    .a_fault(res));
  ram_unit #(.Q(Q), .W(W), .P(P)) mem (.clk(clk), .req(req), .we(we), .row(row), .addr(addr),
    .wdata(wd), .rdata(rd), .d_sa0('0), .d_sa1('0), .cs_sa1('0), .a_sa0(a0), .a_sa1(a1), .chip_fault(cf));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int r, input logic [2*P-1:0] exp, input string name);
    int cyc;
    trow = 2'(r);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks += 2;
    if (res !== exp) begin failures++; $display("FAIL %s: %b expected %b", name, res, exp); end
    if (cyc != 3 * (2 * P + 1) + 1) begin failures++; $display("FAIL %s: %0d cycles", name, cyc); end
  endtask

  initial begin
    start = 0; trow = 0; a0 = '0; a1 = '0;
    foreach (cf[r, c]) cf[r][c] = '{kind: CF_NONE, val: 0, row: 0, col: 0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < Q; r++) run(r, '0, "fault-free");
    a0[0] = 12'b0000_1000_0010;   // bits 1 and 7 stuck at 0
    a1[0] = 12'b1000_0000_1000;   // bits 3 and 11 stuck at 1
    run(0, 12'b1000_1000_1010, "example lines in row 0");
    run(1, '0, "row 1 clean");
    a1[2] = 12'b0000_0001_0000;
    run(2, 12'b0000_0001_0000, "bit 4 stuck at 1 in row 2");
    run(3, '0, "row 3 clean");
    a0[3] = 12'b0100_0000_0000;
    cf[3][6] = '{kind: CF_ROW_SA1, val: 0, row: 0, col: 0};
    run(3, 12'b0100_0000_0000, "bit 10 stuck at 0 and a faulty chip in row 3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
