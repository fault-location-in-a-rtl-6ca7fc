// pattern_gen: address/data sequences of the three RAM chip tests.
//
// Produces, one element per `step`, the address and the data bit of a
// pattern that covers every location of a chip row once (N = 2^(2P)
// elements).  The same sequence is used to write a pattern and, restarted,
// to verify it.  Address overflow wraps (2P bits).
//   PM_DC  (decoder test, "WRITE i-th PATTERN"): starts at STAD = (i,i)
//          with bit 1 (word W1), then N-1 successive addresses with bit 0.
//          COUNTER 1 counts the elements; the last is at COUNTER 1 = N-1.
//   PM_E   (extended-fault test, "WRITE j-th PATTERN"): starts at
//          STAD = ([2^P - j], 0); groups of one bit-1 element followed by
//          2^P bit-0 elements at successive addresses (COUNTER 1 inside a
//          group, COUNTER 2 counts groups), and a final bit-1 element after
//          2^P - 1 groups.  The 1s land on (i, [i+j]).
//   PM_API (adjacent-pattern test, "WRITE l-th PATTERN"): starts at address
//          0 with the controlled register loaded with the l-th assignment;
//          the bit is the register output, and every step triggers it.
//
// Interface: start (one cycle) loads mode, sel (i or j) and assign_val (printed
// order, A in bit 8).  addr/bit_o/last describe the current element from the
// cycle after start; step advances to the next.  The flow of each pattern
// follows the document's flow charts; the handshake is this design's own.
module pattern_gen
  import ram_diag_pkg::*;
#(
  parameter int unsigned P = 6
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  pat_mode_e      mode,
  input  logic [P-1:0]   sel,
  input  logic [8:0]     assign_val,
  input  logic           step,
  output logic [2*P-1:0] addr,
  output logic           bit_o,
  output logic           last
);
  localparam int unsigned S = 1 << P;

  pat_mode_e      mode_q;
  logic [2*P-1:0] addr_q;
  logic [2*P-1:0] cnt1;    // COUNTER 1
  logic [P-1:0]   cnt2;    // COUNTER 2 (E pattern)
  logic           cr_bit;
  logic [8:0]     cr_init;

  // Assignment as printed (A first) to register order (A in bit 0).
  always_comb
    for (int unsigned b = 0; b < 9; b++) cr_init[b] = assign_val[8-b];

  controlled_register #(.P(P)) u_creg (
    .clk     (clk),
    .rst_n   (rst_n),
    .load    (start && mode == PM_API),
    .load_val(cr_init),
    .trg     (step && mode_q == PM_API && !last),
    .obit    (cr_bit)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mode_q <= PM_DC;
      addr_q <= '0;
      cnt1   <= '0;
      cnt2   <= '0;
    end else if (start) begin
      mode_q <= mode;
      cnt1   <= '0;
      cnt2   <= '0;
      unique case (mode)
        PM_DC:   addr_q <= {sel, sel};
        PM_E:    addr_q <= {P'(S) - sel, P'(0)};
        default: addr_q <= '0;
      endcase
    end else if (step && !last) begin
      addr_q <= addr_q + 1'b1;
      if (mode_q == PM_E) begin
        if (cnt1 == (2*P)'(S)) begin
          cnt1 <= '0;
          cnt2 <= cnt2 + 1'b1;
        end else begin
          cnt1 <= cnt1 + 1'b1;
        end
      end else begin
        cnt1 <= cnt1 + 1'b1;
      end
    end
  end

  assign addr = addr_q;

  always_comb begin
    unique case (mode_q)
      PM_DC:   begin bit_o = (cnt1 == '0); last = (cnt1 == '1); end
      PM_E:    begin bit_o = (cnt1 == '0); last = (cnt1 == '0) && (cnt2 == '1); end
      default: begin bit_o = cr_bit;       last = (cnt1 == '1); end
    endcase
  end
endmodule
