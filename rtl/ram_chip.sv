// ram_chip: one-bit-wide random-access memory chip with a symmetric array.
//
// The 2^(2P) storage elements form a square array of 2^P rows and 2^P
// columns.  An address (i,j) is split into the row p-tuple i = addr[2P-1:P]
// and the column p-tuple j = addr[P-1:0]; a row decoder and a column decoder
// drive one row line and one column line, and the element on their crossing
// is written or read.  Each element behaves as the two-state machine of the
// classic storage-element state table: WRITE 0 / WRITE 1 set the state, READ
// returns it.
//
// Interface and timing: cs_n is active low.  With cs_n low and we high, din
// is stored at the rising edge.  With cs_n low and we low, the addressed bit
// appears on z one cycle later.  At every other time z is 1: a chip that is
// not read releases its output line, which is pulled high, so that a chip
// whose select line is stuck at 1 reads as all ones.
//
// Fault injection (this design's addition, for demonstrating diagnosis): the
// `fault` input may make a cell stuck, a row or column line stuck at 0
// (always selected) or at 1 (never selected), the row decoder select two lines
// for one input value, or a cell suffer an extended or an adjacent-pattern
// fault.  Several selected cells read as a wired AND.  With CF_NONE the chip
// is a plain RAM.  The array has no reset; every test writes before it reads.
module ram_chip
  import ram_diag_pkg::*;
#(
  parameter int unsigned P = 6
) (
  input  logic          clk,
  input  logic          cs_n,
  input  logic          we,
  input  logic [2*P-1:0] addr,
  input  logic          din,
  output logic          z,
  input  chip_fault_t   fault
);
  localparam int unsigned S = 1 << P;   // rows = columns

  logic [S-1:0] mem [S];

  logic [P-1:0] ri, cj;
  logic [S-1:0] row_dec, col_dec;   // decoder outputs
  logic [S-1:0] rsel, csel;         // lines as they arrive at the array
  logic         sel;

  assign ri  = addr[2*P-1:P];
  assign cj  = addr[P-1:0];
  assign sel = ~cs_n;

  line_decoder #(.IN_W(P), .OUT_N(S)) u_row_dec (.in_val(ri), .en(sel), .sel(row_dec));
  line_decoder #(.IN_W(P), .OUT_N(S)) u_col_dec (.in_val(cj), .en(sel), .sel(col_dec));

  logic [P-1:0] frow, fcol;
  assign frow = fault.row[P-1:0];
  assign fcol = fault.col[P-1:0];

  // Row and column cables with their line faults.
  always_comb begin
    rsel = row_dec;
    csel = col_dec;
    if (sel) begin
      unique case (fault.kind)
        CF_ROW_SA0:   rsel[frow] = 1'b1;
        CF_ROW_SA1:   rsel[frow] = 1'b0;
        CF_COL_SA0:   csel[fcol] = 1'b1;
        CF_COL_SA1:   csel[fcol] = 1'b0;
        CF_DEC_ALIAS: if (ri == frow) rsel[fcol] = 1'b1;
        default: ;
      endcase
    end
  end

  // Forced value of the faulty cell (frow,fcol), if its condition holds.
  logic force_en;
  always_comb begin
    logic others_ok;
    others_ok = 1'b1;
    force_en  = 1'b0;
    unique case (fault.kind)
      CF_CELL_SA: force_en = 1'b1;
      CF_EXT: begin
        others_ok = 1'b1;
        for (int unsigned r = 0; r < S; r++)
          if (r != 32'(frow) && mem[r][fcol] != fault.val) others_ok = 1'b0;
        for (int unsigned c = 0; c < S; c++)
          if (c != 32'(fcol) && mem[frow][c] != fault.val) others_ok = 1'b0;
        force_en = others_ok;
      end
      CF_API: begin
        others_ok = 1'b1;
        if (frow != '0      && mem[frow - 1'b1][fcol] != fault.val) others_ok = 1'b0;
        if (frow != P'(S-1) && mem[frow + 1'b1][fcol] != fault.val) others_ok = 1'b0;
        if (fcol != '0      && mem[frow][fcol - 1'b1] != fault.val) others_ok = 1'b0;
        if (fcol != P'(S-1) && mem[frow][fcol + 1'b1] != fault.val) others_ok = 1'b0;
        force_en = others_ok;
      end
      default: force_en = 1'b0;
    endcase
  end

  // Read: wired AND of every selected element; 1 when none is selected.
  logic rd_bit;
  always_comb begin
    logic [S-1:0] rowword, view;
    rowword = '1;
    view    = '0;
    for (int unsigned r = 0; r < S; r++) begin
      if (rsel[r]) begin
        view = mem[r];
        if (force_en && r == 32'(frow)) view[fcol] = fault.val;
        rowword &= view;
      end
    end
    rd_bit = &(rowword | ~csel);
  end

  always_ff @(posedge clk) begin
    if (sel && we) begin
      for (int unsigned r = 0; r < S; r++)
        if (rsel[r]) mem[r] <= (mem[r] & ~csel) | (csel & {S{din}});
    end
    z <= (sel && !we) ? rd_bit : 1'b1;
  end

endmodule
