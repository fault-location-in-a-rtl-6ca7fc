// d_test: test for stuck data-cable lines (D-fault).
//
// In one fixed location (address 0) of every chip row u = 0..q-1 it writes
// the word u, then reads the q words back (matrix M0); then it writes the
// complements of u, counting down from all ones, and reads them back
// (matrix M1).  A data line whose bit was 0 in every one of the 2q reads is
// stuck at 0, one whose bit was 1 in all of them is stuck at 1.  Because
// every row receives a different word and its complement, a fault in a
// single chip row cannot make a column constant.  Columns are reduced as the
// words arrive instead of storing M0 and M1.
//
// Interface: start (one cycle) begins; d_sa0/d_sa1 hold the result from the
// done pulse until the next start.  The memory port issues one access per
// request cycle; read data is taken the cycle after a read.  Length: 2q
// writes and 2q reads; done pulses 6q+1 cycles after start.
module d_test #(
  parameter int unsigned Q = 4,
  parameter int unsigned W = 8,
  parameter int unsigned P = 6,
  localparam int unsigned M = (Q > 1) ? $clog2(Q) : 1
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
  output logic [W-1:0]   d_sa0,
  output logic [W-1:0]   d_sa1
);
  typedef enum logic [1:0] {S_IDLE, S_WR, S_RD, S_CAP} state_e;
  state_e       state;
  logic         pass;      // 0: words u (M0), 1: complements (M1)
  logic [M-1:0] u;
  logic         last_row;

  assign last_row = (u == M'(Q - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      pass  <= 1'b0;
      u     <= '0;
      d_sa0 <= '0;
      d_sa1 <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_WR;
          pass  <= 1'b0;
          u     <= '0;
          d_sa0 <= '1;
          d_sa1 <= '1;
        end
        S_WR: begin
          u <= last_row ? '0 : u + 1'b1;
          if (last_row) state <= S_RD;
        end
        S_RD: state <= S_CAP;
        S_CAP: begin
          d_sa0 <= d_sa0 & ~mem_rdata;
          d_sa1 <= d_sa1 &  mem_rdata;
          u     <= last_row ? '0 : u + 1'b1;
          if (!last_row)  state <= S_RD;
          else if (!pass) begin state <= S_WR; pass <= 1'b1; end
          else begin state <= S_IDLE; done <= 1'b1; end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign mem_req   = (state == S_WR) || (state == S_RD);
  assign mem_we    = (state == S_WR);
  assign mem_row   = u;
  assign mem_addr  = '0;
  assign mem_wdata = pass ? ~W'(u) : W'(u);
endmodule
