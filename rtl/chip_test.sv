// chip_test: the three RAM chip tests on one chip row.
//
// Runs, on chip row `row`, in this order:
//   EXPT 4, decoder and row/column-line faults: for i = 0..2^p-1 write the
//     DC pattern (all-ones word at (i,i), all-zeros elsewhere), then verify.
//   EXPT 5, extended and stuck-cell faults: for j = 0..2^p-1 write the E
//     pattern (all ones on the diagonal (i,[i+j]), zeros elsewhere) and
//     verify; then the same with the words swapped.
//   EXPT 6, adjacent-pattern interference: for each of the 32 block
//     assignments write the API pattern and verify.
// WRITE sends the pattern of pattern_gen to the row, one location per
// cycle.  VERIFY reads the locations in the same order, one read per cycle,
// and XORs each word with the word written there; every 1 in the result
// marks the chip of that bit as faulty.  Each test keeps its own mask.
//
// Interface: start begins and latches row; done pulses at the end; the
// masks hold until the next start.  accesses counts writes plus reads:
// 2 * (3 * 2^p + 32) * N for one row, which is the length the document gives
// (224N write-and-read pairs for p = 6).  One access per cycle; a pattern
// takes 2N + 3 cycles, so done pulses (3 * 2^p + 32) * (2N + 3) + 1 cycles
// after start.
module chip_test
  import ram_diag_pkg::*;
#(
  parameter int unsigned Q = 4,
  parameter int unsigned W = 8,
  parameter int unsigned P = 6,
  localparam int unsigned M = (Q > 1) ? $clog2(Q) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [M-1:0]   row,
  output logic           done,
  output logic           mem_req,
  output logic           mem_we,
  output logic [M-1:0]   mem_row,
  output logic [2*P-1:0] mem_addr,
  output logic [W-1:0]   mem_wdata,
  input  logic [W-1:0]   mem_rdata,
  output logic [W-1:0]   dc_fail,
  output logic [W-1:0]   e_fail,
  output logic [W-1:0]   api_fail,
  output logic [31:0]    accesses
);
  localparam int unsigned S  = 1 << P;
  localparam int unsigned IX = (P > 5) ? P : 5;

  typedef enum logic [2:0] {S_IDLE, S_WLOAD, S_WR, S_VLOAD, S_RD, S_DRAIN} state_e;
  typedef enum logic [1:0] {X_DC, X_E, X_API} expt_e;

  state_e         state;
  expt_e          expt;
  logic           pol;            // EXPT 5 second half: words swapped
  logic [IX-1:0]  idx;            // i, j or l-1
  logic [M-1:0]   row_q;

  logic           pg_start, pg_step, pg_bit, pg_last;
  logic [2*P-1:0] pg_addr;
  pat_mode_e      pg_mode;

  // read pipeline: expected bit of the word arriving this cycle
  logic           chk_v, chk_exp;

  always_comb begin
    unique case (expt)
      X_DC:    pg_mode = PM_DC;
      X_E:     pg_mode = PM_E;
      default: pg_mode = PM_API;
    endcase
  end

  assign pg_start = (state == S_WLOAD) || (state == S_VLOAD);
  assign pg_step  = (state == S_WR) || (state == S_RD);

  pattern_gen #(.P(P)) u_pat (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (pg_start),
    .mode      (pg_mode),
    .sel       (idx[P-1:0]),
    .assign_val(API_ASSIGN[idx[4:0]]),
    .step      (pg_step),
    .addr      (pg_addr),
    .bit_o     (pg_bit),
    .last      (pg_last)
  );

  logic last_pattern;
  always_comb begin
    unique case (expt)
      X_DC:    last_pattern = 1'b0;
      X_E:     last_pattern = 1'b0;
      default: last_pattern = (idx == IX'(N_ASSIGN - 1));
    endcase
  end

  logic [W-1:0] diff;
  assign diff = mem_rdata ^ {W{chk_exp}};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      expt     <= X_DC;
      pol      <= 1'b0;
      idx      <= '0;
      row_q    <= '0;
      chk_v    <= 1'b0;
      chk_exp  <= 1'b0;
      dc_fail  <= '0;
      e_fail   <= '0;
      api_fail <= '0;
      accesses <= '0;
      done     <= 1'b0;
    end else begin
      done  <= 1'b0;
      chk_v <= (state == S_RD);
      chk_exp <= pg_bit ^ pol;
      if (mem_req) accesses <= accesses + 1'b1;
      if (chk_v) begin
        unique case (expt)
          X_DC:    dc_fail  <= dc_fail  | diff;
          X_E:     e_fail   <= e_fail   | diff;
          default: api_fail <= api_fail | diff;
        endcase
      end
      unique case (state)
        S_IDLE: if (start) begin
          state    <= S_WLOAD;
          expt     <= X_DC;
          pol      <= 1'b0;
          idx      <= '0;
          row_q    <= row;
          dc_fail  <= '0;
          e_fail   <= '0;
          api_fail <= '0;
          accesses <= '0;
        end
        S_WLOAD: state <= S_WR;
        S_WR:    if (pg_last) state <= S_VLOAD;
        S_VLOAD: state <= S_RD;
        S_RD:    if (pg_last) state <= S_DRAIN;
        S_DRAIN: begin
          // last read compared this cycle; choose the next pattern
          if (last_pattern) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            state <= S_WLOAD;
            if (expt != X_API && idx == IX'(S - 1)) begin
              idx <= '0;
              if (expt == X_DC) expt <= X_E;
              else if (!pol)    pol  <= 1'b1;
              else begin        expt <= X_API; pol <= 1'b0; end
            end else begin
              idx <= idx + 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign mem_req   = (state == S_WR) || (state == S_RD);
  assign mem_we    = (state == S_WR);
  assign mem_row   = row_q;
  assign mem_addr  = pg_addr;
  assign mem_wdata = {W{pg_bit ^ pol}};
endmodule
