// controlled_register: source of the data bit for the adjacent-pattern test.
//
// A (P+1)-bit counter whose top bit is the overflow flag OVF, and a 9-bit
// register holding one assignment of a 3x3 block as {I,H,G,F,E,D,C,B,A}
// with A in bit 0.  Bit 0 is the output obit.  On each trigger (trg):
//   - the counter counts up by one;
//   - if OVF is now 0, the three low bits rotate right once (A B C A B ...
//     along a row of the array);
//   - if OVF is now 1, OVF is cleared and the whole register rotates right
//     three times, so the next row of storage elements continues with the
//     next row of the block (D E F, then G H I).
// load clears the counter and loads the register; it wins over trg.  All
// updates at the rising clock edge, obit follows the register.
//
// The rotations and the use of OVF follow the document.  The counter width
// is this design's reading: OVF is set after 2^P triggers, one row of
// storage elements, whereas the text gives the counter 2p+1 bits.
module controlled_register #(
  parameter int unsigned P = 6
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic [8:0] load_val,
  input  logic       trg,
  output logic       obit
);
  logic [P:0] cnt;
  logic [8:0] sreg;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt  <= '0;
      sreg <= '0;
    end else if (load) begin
      cnt  <= '0;
      sreg <= load_val;
    end else if (trg) begin
      logic [P:0] nxt;
      nxt = cnt + 1'b1;
      if (nxt[P]) begin
        cnt  <= '0;
        sreg <= {sreg[2:0], sreg[8:3]};
      end else begin
        cnt  <= nxt;
        sreg <= {sreg[8:3], sreg[0], sreg[2:1]};
      end
    end
  end

  assign obit = sreg[0];
endmodule
