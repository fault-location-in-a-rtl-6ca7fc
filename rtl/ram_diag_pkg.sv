// Shared types and constants of the RAM-unit fault-location design.
//
// The design tests a memory built from q rows and W columns of one-bit RAM
// chips, each chip a square 2^p x 2^p array, and locates faults to single
// lines of the data (D), chip-select (CS) and address (A) cables or to
// single chips.  This package holds what several modules share: the kinds
// of chip fault a chip model can be given (for demonstration), the pattern
// modes of the RAM-chip tests, the stages of the fault-location sequence and
// the 32 block assignments of the adjacent-pattern-interference test.
package ram_diag_pkg;

  // Largest p supported by the fault descriptor fields.
  localparam int unsigned MAX_P = 8;

  // Fault injected into one RAM chip.  Only one fault per chip.
  typedef enum logic [3:0] {
    CF_NONE      = 4'd0,
    CF_CELL_SA   = 4'd1,  // cell (row,col) stuck at val
    CF_ROW_SA0   = 4'd2,  // row line `row` always selected
    CF_ROW_SA1   = 4'd3,  // row line `row` never selected
    CF_COL_SA0   = 4'd4,  // column line `col` always selected
    CF_COL_SA1   = 4'd5,  // column line `col` never selected
    CF_DEC_ALIAS = 4'd6,  // row decoder input `row` also drives row line `col`
    CF_EXT       = 4'd7,  // extended fault: cell reads val when its row and column hold val
    CF_API       = 4'd8   // cell reads val when its four adjacent neighbours hold val
  } chip_fault_kind_e;

  typedef struct packed {
    chip_fault_kind_e         kind;
    logic                     val;
    logic [MAX_P-1:0]         row;
    logic [MAX_P-1:0]         col;
  } chip_fault_t;

  // Pattern of the RAM chip tests.
  typedef enum logic [1:0] {
    PM_DC  = 2'd0,  // W1 at (i,i), W0 elsewhere
    PM_E   = 2'd1,  // W1 at (i,[i+j]), W0 elsewhere
    PM_API = 2'd2   // controlled-register output over the whole array
  } pat_mode_e;

  // Stage of the fault-location sequence.
  typedef enum logic [2:0] {
    ST_IDLE   = 3'd0,
    ST_D      = 3'd1,
    ST_CS     = 3'd2,
    ST_A      = 3'd3,
    ST_RAM    = 3'd4,
    ST_REPAIR = 3'd5,
    ST_DONE   = 3'd6
  } stage_e;

  // The 32 assignments of a 3x3 block (A B C / D E F / G H I), written as
  // printed: bit 8 is A, bit 0 is I.  Together they give every one of the
  // 32 values to each storage element and its four neighbours.
  localparam int unsigned N_ASSIGN = 32;
  localparam logic [8:0] API_ASSIGN [N_ASSIGN] = '{
    9'b100_000_100, 9'b100_000_011, 9'b011_000_100, 9'b011_000_011,
    9'b101_001_101, 9'b000_100_000, 9'b001_101_001, 9'b101_001_010,
    9'b010_001_101, 9'b010_001_010, 9'b111_100_000, 9'b110_101_001,
    9'b000_100_111, 9'b111_100_111, 9'b001_101_110, 9'b110_101_110,
    9'b001_010_001, 9'b001_010_110, 9'b110_010_001, 9'b110_010_110,
    9'b000_011_000, 9'b101_110_101, 9'b100_111_100, 9'b000_011_111,
    9'b111_011_000, 9'b111_011_111, 9'b010_110_101, 9'b011_111_100,
    9'b101_110_010, 9'b010_110_010, 9'b100_111_011, 9'b011_111_011
  };

endpackage
