// cs_test: test for chip-select lines stuck at 1 (CS-fault).
//
// For u = 0..q-1 it stores the Reed-Muller code word of K = u in address 0
// of chip row u, then reads the q words back in the same order and decodes
// them (the rows of matrix S).  A row whose decoded value is not u has a CS
// line stuck at 1: such a row cannot be selected, reads all ones, and all
// ones decodes to 100...0, which is never a row number.  The code lets the
// test pass through up to t faulty chips in a row (t = 1 for W = 8).
//
// Interface: start begins; cs_fault (bit u = line s_u) holds the result
// from the done pulse.  q writes and q reads; done pulses 3q+1 cycles after start.
module cs_test #(
  parameter int unsigned Q = 4,
  parameter int unsigned W = 8,
  parameter int unsigned P = 6,
  localparam int unsigned M  = (Q > 1) ? $clog2(Q) : 1,
  localparam int unsigned K1 = $clog2(W) + 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           done,
  output logic           mem_req,
  output logic           mem_we,
  output logic [M-1:0]   mem_row,
  output logic [2*P-1:0] mem_addr,
  output logic [W-1:0]   mem_wdata,
  input  logic [W-1:0]   mem_rdata,
  output logic [Q-1:0]   cs_fault
);
  typedef enum logic [1:0] {S_IDLE, S_WR, S_RD, S_CAP} state_e;
  state_e        state;
  logic [M-1:0]  u;
  logic          last_row;
  logic [K1-1:0] s_row;

  assign last_row = (u == M'(Q - 1));

  rm_encoder #(.W(W)) u_enc (.info(K1'(u)), .code(mem_wdata));
  rm_decoder #(.W(W)) u_dec (.code(mem_rdata), .info(s_row));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      u        <= '0;
      cs_fault <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state    <= S_WR;
          u        <= '0;
          cs_fault <= '0;
        end
        S_WR: begin
          u <= last_row ? '0 : u + 1'b1;
          if (last_row) state <= S_RD;
        end
        S_RD: state <= S_CAP;
        S_CAP: begin
          cs_fault[u] <= (s_row != K1'(u));
          u <= last_row ? '0 : u + 1'b1;
          if (last_row) begin state <= S_IDLE; done <= 1'b1; end
          else state <= S_RD;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign mem_req  = (state == S_WR) || (state == S_RD);
  assign mem_we   = (state == S_WR);
  assign mem_row  = u;
  assign mem_addr = '0;

  initial assert (Q <= (1 << (K1 - 1))) else $error("cs_test: q must not exceed 2^(K1-1)");
endmodule
