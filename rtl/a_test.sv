// a_test: test for stuck address lines of one chip row (A-fault).
//
// In chip row `row` it stores, for i = 1..2p, the Reed-Muller code word of
// U = i at the address that has only address bit i-1 set (a register T
// starting at 00..01 and shifted left), then the all-zero code word at
// address 0.  It reads the 2p+1 words back in the same order and decodes
// them (matrix R).  If address line i-1 is stuck at 0 or 1, the address with
// only that bit set and address 0 reach the same storage word, so the null
// word overwrites U = i and row i of R is 0 instead of i.  The code lets the
// test pass through up to t faulty chips in the row.
//
// Interface: start begins and latches row; a_fault (bit i-1 = row i of R
// differs from i) holds the result from the done pulse.  2p+1 writes and
// 2p+1 reads; done pulses 3(2p+1)+1 cycles after start.
module a_test #(
  parameter int unsigned Q = 4,
  parameter int unsigned W = 8,
  parameter int unsigned P = 6,
  localparam int unsigned M = (Q > 1) ? $clog2(Q) : 1,
  localparam int unsigned K = $clog2(W) + 1
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
  output logic [2*P-1:0] a_fault
);
  localparam int unsigned IW = $clog2(2*P + 1);

  typedef enum logic [1:0] {S_IDLE, S_WR, S_RD, S_CAP} state_e;
  state_e         state;
  logic [M-1:0]   row_q;
  logic [IW-1:0]  idx;       // 0..2p-1: address bit idx, U = idx+1; 2p: null word
  logic [2*P-1:0] t_reg;     // register T
  logic           last_idx;
  logic [K-1:0]   u_val, r_row;

  assign last_idx = (idx == IW'(2*P));
  assign u_val    = last_idx ? '0 : K'(idx + 1'b1);

  rm_encoder #(.W(W)) u_enc (.info(u_val), .code(mem_wdata));
  rm_decoder #(.W(W)) u_dec (.code(mem_rdata), .info(r_row));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      row_q   <= '0;
      idx     <= '0;
      t_reg   <= (2*P)'(1);
      a_fault <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state   <= S_WR;
          row_q   <= row;
          idx     <= '0;
          t_reg   <= (2*P)'(1);
          a_fault <= '0;
        end
        S_WR: begin
          if (last_idx) begin
            state <= S_RD;
            idx   <= '0;
            t_reg <= (2*P)'(1);
          end else begin
            idx   <= idx + 1'b1;
            t_reg <= t_reg << 1;
          end
        end
        S_RD: state <= S_CAP;
        S_CAP: begin
          if (!last_idx) a_fault[idx] <= (r_row != u_val);
          if (last_idx) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            state <= S_RD;
            idx   <= idx + 1'b1;
            t_reg <= t_reg << 1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign mem_req  = (state == S_WR) || (state == S_RD);
  assign mem_we   = (state == S_WR);
  assign mem_row  = row_q;
  assign mem_addr = last_idx ? '0 : t_reg;

  initial assert (2*P < (1 << K)) else $error("a_test: 2p code values need more information bits");
endmodule
