// ram_unit: a memory unit built from a q x W array of one-bit RAM chips.
//
// All W chips of one row are selected together, so a row stores one word
// of W bits per location and the q rows multiply the capacity by q.  Three
// cables connect the array:
//   - data cable D: one line per chip column, bit W-1 is d_1 and bit 0 is
//     d_W.  The outputs Z of the chips of one column join on their line as a
//     wired AND; an unread chip drives 1.
//   - chip select cable CS: lines s_0..s_(q-1), active low, one per chip
//     row, driven by a decoder of the m-tuple `row`.
//   - address cable A: the 2p-tuple `addr`, with a branch for each chip row.
//
// Timing: a write (req, we) takes effect at the clock edge; a read (req, !we)
// returns its word on rdata in the next cycle.
//
// Fault injection (this design's addition): every line of D may be stuck at
// 0 or 1 (it then forces both the value written and the value read), every
// CS line may be stuck at 1 (its row can never be selected), every A line of
// every chip row may be stuck at 0 or 1, and each chip may carry one chip
// fault (see ram_chip).  With all inputs zero the unit is fault-free.
module ram_unit
  import ram_diag_pkg::*;
#(
  parameter int unsigned Q = 4,
  parameter int unsigned W = 8,
  parameter int unsigned P = 6,
  localparam int unsigned M = (Q > 1) ? $clog2(Q) : 1
) (
  input  logic                 clk,
  input  logic                 req,
  input  logic                 we,
  input  logic [M-1:0]         row,
  input  logic [2*P-1:0]       addr,
  input  logic [W-1:0]         wdata,
  output logic [W-1:0]         rdata,
  // injected faults
  input  logic [W-1:0]         d_sa0,
  input  logic [W-1:0]         d_sa1,
  input  logic [Q-1:0]         cs_sa1,
  input  logic [Q-1:0][2*P-1:0] a_sa0,
  input  logic [Q-1:0][2*P-1:0] a_sa1,
  input  chip_fault_t          chip_fault [Q][W]
);
  logic [Q-1:0] row_sel;     // decoder output, active high
  logic [Q-1:0] cs_n;        // CS lines as they reach the chips
  logic [W-1:0] d_wr;        // D lines while writing
  logic [Q-1:0][W-1:0] z;    // chip outputs
  logic [W-1:0] d_rd;        // D lines while reading, before line faults

  line_decoder #(.IN_W(M), .OUT_N(Q)) u_cs_dec (.in_val(row), .en(req), .sel(row_sel));

  assign cs_n = ~row_sel | cs_sa1;
  assign d_wr = (wdata & ~d_sa0) | d_sa1;

  for (genvar r = 0; r < Q; r++) begin : g_row
    logic [2*P-1:0] a_row;
    assign a_row = (addr & ~a_sa0[r]) | a_sa1[r];
    for (genvar c = 0; c < W; c++) begin : g_col
      ram_chip #(.P(P)) u_chip (
        .clk  (clk),
        .cs_n (cs_n[r]),
        .we   (we),
        .addr (a_row),
        .din  (d_wr[c]),
        .z    (z[r][c]),
        .fault(chip_fault[r][c])
      );
    end
  end

  always_comb begin
    d_rd = '1;
    for (int unsigned r = 0; r < Q; r++) d_rd &= z[r];
  end

  assign rdata = (d_rd & ~d_sa0) | d_sa1;

endmodule
