// ram_diag_top: a RAM unit with its fault-location tester.
//
// The memory under test is a q x W array of one-bit RAM chips, each a
// 2^p x 2^p symmetric array (ram_unit); the tester (diag_ctrl) drives its
// memory port and runs the data-cable, chip-select, address-cable and RAM
// chip tests in that order, stopping for repair after a cable test that
// found faulty lines.  Default size: q = 4 rows, W = 8 columns, p = 6
// (4096 bits per chip, 16 Kbyte in all).
//
// Ports: start begins a diagnosis; repair_req asks for repair of the lines
// just reported and resume continues; done marks the end.  The fault inputs
// (d_sa0 ... chip_fault) inject faults into the RAM unit for demonstration;
// tie them to zero / CF_NONE for a fault-free unit.  Results: data lines
// stuck at 0/1, CS lines stuck at 1, stuck address lines per chip row, and
// faulty chips per row (all tests and each test apart).  A full diagnosis of
// the default unit takes about 2 * (3 * 2^p + 32) * 2^(2p) * q cycles.
module ram_diag_top
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
  // injected faults
  input  logic [W-1:0]          inj_d_sa0,
  input  logic [W-1:0]          inj_d_sa1,
  input  logic [Q-1:0]          inj_cs_sa1,
  input  logic [Q-1:0][2*P-1:0] inj_a_sa0,
  input  logic [Q-1:0][2*P-1:0] inj_a_sa1,
  input  chip_fault_t           inj_chip [Q][W],
  // located faults
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
  logic           mem_req, mem_we;
  logic [M-1:0]   mem_row;
  logic [2*P-1:0] mem_addr;
  logic [W-1:0]   mem_wdata, mem_rdata;

  diag_ctrl #(.Q(Q), .W(W), .P(P)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .resume(resume),
    .repair_req(repair_req), .done(done), .stage(stage),
    .mem_req(mem_req), .mem_we(mem_we), .mem_row(mem_row), .mem_addr(mem_addr),
    .mem_wdata(mem_wdata), .mem_rdata(mem_rdata),
    .d_sa0(d_sa0), .d_sa1(d_sa1), .cs_fault(cs_fault), .a_fault(a_fault),
    .chip_bad(chip_bad), .chip_dc(chip_dc), .chip_e(chip_e), .chip_api(chip_api),
    .chip_accesses(chip_accesses));

  ram_unit #(.Q(Q), .W(W), .P(P)) u_unit (
    .clk(clk), .req(mem_req), .we(mem_we), .row(mem_row), .addr(mem_addr),
    .wdata(mem_wdata), .rdata(mem_rdata),
    .d_sa0(inj_d_sa0), .d_sa1(inj_d_sa1), .cs_sa1(inj_cs_sa1),
    .a_sa0(inj_a_sa0), .a_sa1(inj_a_sa1), .chip_fault(inj_chip));
endmodule
