// diag_ctrl: fault-location sequencer for a RAM unit.
//
// The tests are only trustworthy in a particular order: a stuck data line
// spoils every test, a stuck chip-select or address line spoils the RAM chip
// tests, while chip faults (at most t per row, in at most q-1 rows) spoil
// none of the cable tests.  The order that follows is D, CS, A, RAM, and
// this sequencer runs it:
//   1. d_test once;                  result d_sa0 / d_sa1
//   2. cs_test once;                 result cs_fault
//   3. a_test for rows z = 0..q-1;   result a_fault[z]
//   4. chip_test for rows x = 0..q-1; result chip_bad[x] (any of the three
//      chip tests) and the per-test masks.
// After each cable test (1, 2, and 3 over all rows) that found faulty lines
// it raises repair_req and waits for a resume pulse, standing for the
// repair of those lines, before it goes on; done rises at the end and stays
// until the next start.  stage tells which test runs.  The sub-tests share
// the memory port; only the active one drives it.
module diag_ctrl
  import ram_diag_pkg::*;
#(
  parameter int unsigned Q = 4,
  parameter int unsigned W = 8,
  parameter int unsigned P = 6,
  localparam int unsigned M = (Q > 1) ? $clog2(Q) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic                  resume,
  output logic                  repair_req,
  output logic                  done,
  output stage_e                stage,
  output logic                  mem_req,
  output logic                  mem_we,
  output logic [M-1:0]          mem_row,
  output logic [2*P-1:0]        mem_addr,
  output logic [W-1:0]          mem_wdata,
  input  logic [W-1:0]          mem_rdata,
  output logic [W-1:0]          d_sa0,
  output logic [W-1:0]          d_sa1,
  output logic [Q-1:0]          cs_fault,
  output logic [Q-1:0][2*P-1:0] a_fault,
  output logic [Q-1:0][W-1:0]   chip_bad,
  output logic [Q-1:0][W-1:0]   chip_dc,
  output logic [Q-1:0][W-1:0]   chip_e,
  output logic [Q-1:0][W-1:0]   chip_api,
  output logic [31:0]           chip_accesses
);
  stage_e       after_repair;
  logic [M-1:0] rowc;            // z or x
  logic         go;              // start pulse for the sub-test of `stage`

  // sub-test ports
  logic           d_done, cs_done, a_done, r_done;
  logic           d_req, cs_req, a_req, r_req;
  logic           d_we, cs_we, a_we, r_we;
  logic [M-1:0]   d_row, cs_row, a_row, r_row;
  logic [2*P-1:0] d_addr, cs_addr, a_addr, r_addr;
  logic [W-1:0]   d_wd, cs_wd, a_wd, r_wd;
  logic [2*P-1:0] a_res;
  logic [W-1:0]   dc_res, e_res, api_res;
  logic [31:0]    r_acc;

  d_test #(.Q(Q), .W(W), .P(P)) u_d (
    .clk(clk), .rst_n(rst_n), .start(go && stage == ST_D), .done(d_done),
    .mem_req(d_req), .mem_we(d_we), .mem_row(d_row), .mem_addr(d_addr), .mem_wdata(d_wd),
    .mem_rdata(mem_rdata), .d_sa0(d_sa0), .d_sa1(d_sa1));

  cs_test #(.Q(Q), .W(W), .P(P)) u_cs (
    .clk(clk), .rst_n(rst_n), .start(go && stage == ST_CS), .done(cs_done),
    .mem_req(cs_req), .mem_we(cs_we), .mem_row(cs_row), .mem_addr(cs_addr), .mem_wdata(cs_wd),
    .mem_rdata(mem_rdata), .cs_fault(cs_fault));

  a_test #(.Q(Q), .W(W), .P(P)) u_a (
    .clk(clk), .rst_n(rst_n), .start(go && stage == ST_A), .row(rowc), .done(a_done),
    .mem_req(a_req), .mem_we(a_we), .mem_row(a_row), .mem_addr(a_addr), .mem_wdata(a_wd),
    .mem_rdata(mem_rdata), .a_fault(a_res));

  chip_test #(.Q(Q), .W(W), .P(P)) u_ram (
    .clk(clk), .rst_n(rst_n), .start(go && stage == ST_RAM), .row(rowc), .done(r_done),
    .mem_req(r_req), .mem_we(r_we), .mem_row(r_row), .mem_addr(r_addr), .mem_wdata(r_wd),
    .mem_rdata(mem_rdata), .dc_fail(dc_res), .e_fail(e_res), .api_fail(api_res), .accesses(r_acc));

  always_comb begin
    mem_req = 1'b0; mem_we = 1'b0; mem_row = '0; mem_addr = '0; mem_wdata = '0;
    unique case (stage)
      ST_D:   begin mem_req = d_req;  mem_we = d_we;  mem_row = d_row;  mem_addr = d_addr;  mem_wdata = d_wd;  end
      ST_CS:  begin mem_req = cs_req; mem_we = cs_we; mem_row = cs_row; mem_addr = cs_addr; mem_wdata = cs_wd; end
      ST_A:   begin mem_req = a_req;  mem_we = a_we;  mem_row = a_row;  mem_addr = a_addr;  mem_wdata = a_wd;  end
      ST_RAM: begin mem_req = r_req;  mem_we = r_we;  mem_row = r_row;  mem_addr = r_addr;  mem_wdata = r_wd;  end
      default: ;
    endcase
  end

  logic last_row;
  assign last_row = (rowc == M'(Q - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      stage         <= ST_IDLE;
      after_repair  <= ST_IDLE;
      rowc          <= '0;
      go            <= 1'b0;
      a_fault       <= '0;
      chip_bad      <= '0;
      chip_dc       <= '0;
      chip_e        <= '0;
      chip_api      <= '0;
      chip_accesses <= '0;
    end else begin
      go <= 1'b0;
      unique case (stage)
        ST_IDLE, ST_DONE: if (start) begin
          stage         <= ST_D;
          go            <= 1'b1;
          rowc          <= '0;
          a_fault       <= '0;
          chip_bad      <= '0;
          chip_dc       <= '0;
          chip_e        <= '0;
          chip_api      <= '0;
          chip_accesses <= '0;
        end
        ST_D: if (d_done) begin
          if (|{d_sa0, d_sa1}) begin stage <= ST_REPAIR; after_repair <= ST_CS; end
          else begin stage <= ST_CS; go <= 1'b1; end
        end
        ST_CS: if (cs_done) begin
          rowc <= '0;
          if (|cs_fault) begin stage <= ST_REPAIR; after_repair <= ST_A; end
          else begin stage <= ST_A; go <= 1'b1; end
        end
        ST_A: if (a_done) begin
          a_fault[rowc] <= a_res;
          if (!last_row) begin
            rowc <= rowc + 1'b1;
            go   <= 1'b1;
          end else begin
            rowc <= '0;
            if (|a_fault || |a_res) begin stage <= ST_REPAIR; after_repair <= ST_RAM; end
            else begin stage <= ST_RAM; go <= 1'b1; end
          end
        end
        ST_RAM: if (r_done) begin
          chip_dc[rowc]  <= dc_res;
          chip_e[rowc]   <= e_res;
          chip_api[rowc] <= api_res;
          chip_bad[rowc] <= dc_res | e_res | api_res;
          chip_accesses  <= chip_accesses + r_acc;
          if (!last_row) begin
            rowc <= rowc + 1'b1;
            go   <= 1'b1;
          end else begin
            stage <= ST_DONE;
          end
        end
        ST_REPAIR: if (resume) begin
          stage <= after_repair;
          go    <= 1'b1;
        end
        default: stage <= ST_IDLE;
      endcase
    end
  end

  assign repair_req = (stage == ST_REPAIR);
  assign done       = (stage == ST_DONE);
endmodule
