// rm_encoder: encoder of the first-order Reed-Muller code of length W.
//
// The code has K = log2(W)+1 information bits.  Information bit r (r <
// log2 W) adds the generator row whose bit b is NOT b[r]; the top
// information bit adds the all-ones row.  For W = 8 the rows, written d_1
// first (bit 7 first), are 01010101, 00110011, 00001111 and 11111111, which
// reproduces the code words 0001 -> 01010101, 0010 -> 00110011 and
// 0011 -> 01100110 of the cable tests.  The code corrects W/4-1 errors (one
// for W = 8), enough to read a word through a chip row in which that many
// chips are faulty.  Purely combinational.  Bit W-1 (line d_1) lies outside
// every generator row but the all-ones one, so it carries the top
// information bit unchanged.
module rm_encoder #(
  parameter int unsigned W = 8,
  localparam int unsigned M1 = $clog2(W),
  localparam int unsigned K  = M1 + 1
) (
  input  logic [K-1:0] info,
  output logic [W-1:0] code
);
  always_comb begin
    for (int unsigned b = 0; b < W; b++) begin
      logic [M1-1:0] bi;
      bi = M1'(b);
      code[b] = info[M1] ^ (^(info[M1-1:0] & ~bi));
    end
  end
endmodule
