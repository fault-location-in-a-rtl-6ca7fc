// Testbench for diag_ctrl driving a RAM unit (q = 2, W = 8, P = 2).
// Records the order of stages and checks it against the required order
// D, CS, A, RAM, with a repair stop exactly after a cable test that found
// faults: fault-free (no stop), a stuck data line (stop after D), a stuck
// chip-select line (stop after CS) and a stuck address line (stop after A).
// The test bench "repairs" by clearing the injected cable faults before it
// pulses resume.  Also checks that the controller holds in repair until
// resume, the reported lines and that done stays high.
module diag_ctrl_tb;
  import ram_diag_pkg::*;
  localparam int Q = 2, W = 8, P = 2;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, resume, repair_req, done, req, we;
  stage_e stage;
  logic [0:0] row;
  logic [2*P-1:0] addr;
  logic [W-1:0] wd, rd, sa0, sa1, i0, i1;
  logic [Q-1:0] csf, ics;
  logic [Q-1:0][2*P-1:0] af, ia0, ia1;
  logic [Q-1:0][W-1:0] bad, cdc, ce, capi;
  logic [31:0] acc;
  chip_fault_t cf [Q][W];

  diag_ctrl #(.Q(Q), .W(W), .P(P)) dut (.clk(clk), .rst_n(rst_n), .start(start), .resume(resume),
    .repair_req(repair_req), .done(done), .stage(stage), .mem_req(req), .mem_we(we), .mem_row(row),
    .mem_addr(addr), .mem_wdata(wd), .mem_rdata(rd), .d_sa0(sa0), .d_sa1(sa1), .cs_fault(csf),
    .a_fault(af), .chip_bad(bad), .chip_dc(cdc), .chip_e(ce), .chip_api(capi), .chip_accesses(acc));
  ram_unit #(.Q(Q), .W(W), .P(P)) mem (.clk(clk), .req(req), .we(we), .row(row), .addr(addr),
    .wdata(wd), .rdata(rd), .d_sa0(i0), .d_sa1(i1), .cs_sa1(ics), .a_sa0(ia0), .a_sa1(ia1), .chip_fault(cf));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // runs one diagnosis; returns the stages in the order entered
  task automatic diagnose(output string seq);
    stage_e last;
    seq = "";
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    last = ST_IDLE;
    while (!done) begin
      if (stage != last) begin
        seq = {seq, stage.name(), " "};
        last = stage;
      end
      if (repair_req) begin
        i0 = '0; i1 = '0; ics = '0; ia0 = '0; ia1 = '0;
        repeat (3) begin
          @(negedge clk);
          chk(repair_req && stage == ST_REPAIR, "held in repair until resume");
        end
        resume = 1;
        @(negedge clk) resume = 0;
      end else @(negedge clk);
    end
    seq = {seq, stage.name()};
    repeat (5) @(negedge clk);
    chk(done, "done held");
  endtask

  initial begin
    string s;
    start = 0; resume = 0;
    i0 = '0; i1 = '0; ics = '0; ia0 = '0; ia1 = '0;
    foreach (cf[r, c]) cf[r][c] = '{kind: CF_NONE, val: 0, row: 0, col: 0};
    repeat (2) @(negedge clk);
    rst_n = 1;

    diagnose(s);
    chk(s == "ST_D ST_CS ST_A ST_RAM ST_DONE", {"fault-free order: ", s});
    chk(sa0 == 0 && sa1 == 0 && csf == 0 && af == 0 && bad == 0, "fault-free results");
    chk(acc == 32'(Q * 2 * (3 * (1 << P) + 32) * (1 << (2 * P))), $sformatf("chip accesses %0d", acc));

    i1 = 8'b0010_0000;
    diagnose(s);
    chk(s == "ST_D ST_REPAIR ST_CS ST_A ST_RAM ST_DONE", {"D fault order: ", s});
    chk(sa1 == 8'b0010_0000 && sa0 == 0 && bad == 0, "D fault located");

    ics = 2'b10;
    diagnose(s);
    chk(s == "ST_D ST_CS ST_REPAIR ST_A ST_RAM ST_DONE", {"CS fault order: ", s});
    chk(csf == 2'b10 && sa1 == 0 && bad == 0, "CS fault located");

    ia0[1] = 4'b0100;
    diagnose(s);
    chk(s == "ST_D ST_CS ST_A ST_REPAIR ST_RAM ST_DONE", {"A fault order: ", s});
    chk(af[1] == 4'b0100 && af[0] == 0 && csf == 0 && bad == 0, "A fault located");

    cf[0][4] = '{kind: CF_CELL_SA, val: 1, row: 2, col: 3};
    diagnose(s);
    chk(s == "ST_D ST_CS ST_A ST_RAM ST_DONE", {"chip fault order: ", s});
    chk(bad[0] == 8'b0001_0000 && bad[1] == 0 && af == 0 && csf == 0, "chip fault located");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
