// Testbench for cs_test on a RAM unit with q = 4, W = 8, P = 3.
// Cases: fault-free; the chip-select example (s_0 and s_3 stuck at 1);
// one faulty chip in every row at the test location (corrected by the
// code, so no line is reported); one faulty chip plus s_2 stuck at 1.
// Also checks the length: q writes and q reads, done 3q+1 cycles after start.
module cs_test_tb;
  import ram_diag_pkg::*;
  localparam int Q = 4, W = 8, P = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, done, req, we;
  logic [1:0] row;
  logic [2*P-1:0] addr;
  logic [W-1:0] wd, rd;
  logic [Q-1:0] cs1, res;
  logic [Q-1:0][2*P-1:0] az;
  chip_fault_t cf [Q][W];

  cs_test #(.Q(Q), .W(W), .P(P)) dut (.clk(clk), .rst_n(rst_n), .start(start), .done(done),
    .mem_req(req), .mem_we(we), .mem_row(row), .mem_addr(addr), .mem_wdata(wd), .mem_rdata(rd),
    .cs_fault(res));
  ram_unit #(.Q(Q), .W(W), .P(P)) mem (.clk(clk), .req(req), .we(we), .row(row), .addr(addr),
    .wdata(wd), .rdata(rd), .d_sa0('0), .d_sa1('0), .cs_sa1(cs1), .a_sa0(az), .a_sa1(az), .chip_fault(cf));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [Q-1:0] exp, input string name);
    int cyc;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks += 2;
    if (res !== exp) begin failures++; $display("FAIL %s: %b expected %b", name, res, exp); end
    if (cyc != 3 * Q + 1) begin failures++; $display("FAIL %s: %0d cycles", name, cyc); end
  endtask

  initial begin
    start = 0; cs1 = 0; az = '0;
    foreach (cf[r, c]) cf[r][c] = '{kind: CF_NONE, val: 0, row: 0, col: 0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    run('0, "fault-free");
    cs1 = 4'b1001;
    run(4'b1001, "s_0 and s_3 stuck at 1");
    cs1 = 0;
    for (int r = 0; r < Q; r++) cf[r][(r * 3) % W] = '{kind: CF_CELL_SA, val: r[0], row: 0, col: 0};
    run('0, "one faulty chip per row");
    cs1 = 4'b0100;
    run(4'b0100, "faulty chips and s_2 stuck at 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
