// Testbench for d_test on a RAM unit with q = 8 rows, W = 8, P = 3.
// Cases: fault-free; the data-line example (d_1 stuck at 0, d_5 and d_7
// stuck at 1); a stuck cell at the test location of one chip (a chip fault,
// which must not be taken for a line fault); all lines of one column of
// chips unselectable by a CS line stuck at 1 (not a D fault either).
// Also checks the test length: 2q writes and 2q reads, done 6q+1 cycles after start.
module d_test_tb;
  import ram_diag_pkg::*;
  localparam int Q = 8, W = 8, P = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, done, req, we;
  logic [2:0] row;
  logic [2*P-1:0] addr;
  logic [W-1:0] wd, rd, sa0, sa1, inj0, inj1;
  logic [Q-1:0] cs1;
  logic [Q-1:0][2*P-1:0] az;
  chip_fault_t cf [Q][W];
  int n_wr, n_rd;

  d_test #(.Q(Q), .W(W), .P(P)) dut (.clk(clk), .rst_n(rst_n), .start(start), .done(done),
    .mem_req(req), .mem_we(we), .mem_row(row), .mem_addr(addr), .mem_wdata(wd), .mem_rdata(rd),
    .d_sa0(sa0), .d_sa1(sa1));
  ram_unit #(.Q(Q), .W(W), .P(P)) mem (.clk(clk), .req(req), .we(we), .row(row), .addr(addr),
    .wdata(wd), .rdata(rd), .d_sa0(inj0), .d_sa1(inj1), .cs_sa1(cs1), .a_sa0(az), .a_sa1(az), .chip_fault(cf));

  always_ff @(posedge clk) if (req) begin if (we) n_wr++; else n_rd++; end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [W-1:0] e0, input logic [W-1:0] e1, input string name);
    int cyc = 0;
    n_wr = 0; n_rd = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks += 4;
    if (sa0 !== e0 || sa1 !== e1) begin
      failures++;
      $display("FAIL %s: sa0=%b sa1=%b expected %b %b", name, sa0, sa1, e0, e1);
    end
    if (n_wr != 2 * Q || n_rd != 2 * Q) begin failures++; $display("FAIL %s: %0d writes %0d reads", name, n_wr, n_rd); end
    if (cyc != 6 * Q + 1) begin failures++; $display("FAIL %s: %0d cycles", name, cyc); end
    @(negedge clk);
    if (sa0 !== e0) begin failures++; $display("FAIL %s: result not held", name); end
  endtask

  initial begin
    start = 0; inj0 = 0; inj1 = 0; cs1 = 0; az = '0;
    foreach (cf[r, c]) cf[r][c] = '{kind: CF_NONE, val: 0, row: 0, col: 0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    run('0, '0, "fault-free");
    inj0 = 8'b1000_0000; inj1 = 8'b0000_1010;          // d_1 s-a-0, d_5 and d_7 s-a-1
    run(8'b1000_0000, 8'b0000_1010, "example lines");
    inj0 = 0; inj1 = 0;
    cf[5][2] = '{kind: CF_CELL_SA, val: 1, row: 0, col: 0};
    cf[6][2] = '{kind: CF_CELL_SA, val: 1, row: 0, col: 0};
    run('0, '0, "chip faults only");
    foreach (cf[r, c]) cf[r][c] = '{kind: CF_NONE, val: 0, row: 0, col: 0};
    cs1 = 8'b0000_0100;
    run('0, '0, "CS fault only");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
