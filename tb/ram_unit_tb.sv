// Testbench for ram_unit, q = 4, W = 8, P = 3.  A word-level reference
// model (one word array per chip row) applies the injected cable faults in
// its own way: an unselectable row ignores writes and reads all ones, a
// stuck address line changes the location reached in that row only, a
// stuck data line forces its bit on the way in and out, and a stuck cell
// forces one bit of one word.  Random writes and reads are compared.
module ram_unit_tb;
  import ram_diag_pkg::*;
  localparam int Q = 4, W = 8, P = 3, N = 1 << (2 * P);
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic req, we;
  logic [1:0] row;
  logic [2*P-1:0] addr;
  logic [W-1:0] wdata, rdata, d_sa0, d_sa1;
  logic [Q-1:0] cs_sa1;
  logic [Q-1:0][2*P-1:0] a_sa0, a_sa1;
  chip_fault_t cf [Q][W];
  logic [W-1:0] model [Q][N];
  int cf_row, cf_col, cf_addr;
  logic cf_val;
  bit cf_on;

  ram_unit #(.Q(Q), .W(W), .P(P)) dut (.clk(clk), .req(req), .we(we), .row(row), .addr(addr),
    .wdata(wdata), .rdata(rdata), .d_sa0(d_sa0), .d_sa1(d_sa1), .cs_sa1(cs_sa1),
    .a_sa0(a_sa0), .a_sa1(a_sa1), .chip_fault(cf));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(input bit wr, input int r, input int a, input logic [W-1:0] d);
    int ae;
    logic [W-1:0] exp;
    ae = int'((2*P)'(a) & ~a_sa0[r] | a_sa1[r]);
    @(negedge clk);
    req = 1; we = wr; row = 2'(r); addr = (2*P)'(a); wdata = d;
    @(negedge clk);
    req = 0; we = 0;
    if (wr) begin
      if (!cs_sa1[r]) model[r][ae] = (d & ~d_sa0) | d_sa1;
    end else begin
      exp = cs_sa1[r] ? '1 : model[r][ae];
      if (cf_on && !cs_sa1[r] && r == cf_row && ae == cf_addr) exp[cf_col] = cf_val;
      exp = (exp & ~d_sa0) | d_sa1;
      checks++;
      if (rdata !== exp) begin
        failures++;
        if (failures < 20) $display("FAIL read row %0d addr %0d: %b expected %b", r, a, rdata, exp);
      end
    end
  endtask

  task automatic traffic(input int n);
    for (int r = 0; r < Q; r++) for (int a = 0; a < N; a++) access(1, r, a, W'($urandom));
    for (int k = 0; k < n; k++)
      access($urandom_range(1) == 1, $urandom_range(Q - 1), $urandom_range(N - 1), W'($urandom));
    for (int r = 0; r < Q; r++) for (int a = 0; a < N; a++) access(0, r, a, '0);
  endtask

  task automatic clear();
    d_sa0 = '0; d_sa1 = '0; cs_sa1 = '0; a_sa0 = '0; a_sa1 = '0; cf_on = 0;
    foreach (cf[r, c]) cf[r][c] = '{kind: CF_NONE, val: 0, row: 0, col: 0};
  endtask

  initial begin
    req = 0; we = 0; row = 0; addr = 0; wdata = 0;
    cf_row = 0; cf_col = 0; cf_addr = 0; cf_val = 0;
    clear();
    traffic(500);
    d_sa0 = 8'b1000_0000; d_sa1 = 8'b0000_1010;
    traffic(300);
    clear(); cs_sa1 = 4'b1001;
    traffic(300);
    clear(); a_sa0[1] = 6'b000_010; a_sa1[2] = 6'b100_000;
    traffic(300);
    clear(); cf_on = 1; cf_row = 3; cf_col = 5; cf_addr = 2 * 8 + 6; cf_val = 1;
    cf[3][5] = '{kind: CF_CELL_SA, val: 1, row: 2, col: 6};
    traffic(300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
