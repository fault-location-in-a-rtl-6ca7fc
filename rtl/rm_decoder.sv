// rm_decoder: maximum-likelihood decoder of the first-order Reed-Muller code.
//
// For each of the 2^(K-1) code words without the all-ones row it counts the
// distance d to the received word; the complement of that code word is at
// distance W-d.  The closest of all 2^K code words wins, and its
// information bits are the output: the low K-1 bits name the code word and
// the top bit says whether its complement was closer.  Ties go to the
// smallest code word index and to the uncomplemented word.  This corrects up
// to W/4-1 bit errors; a word of all ones decodes to 100...0, which is how a
// chip row that cannot be selected shows up.  Purely combinational; the
// decoder itself is this design's choice, the document only names the code.
module rm_decoder #(
  parameter int unsigned W = 8,
  localparam int unsigned M1 = $clog2(W),
  localparam int unsigned K  = M1 + 1
) (
  input  logic [W-1:0] code,
  output logic [K-1:0] info
);
  localparam int unsigned DW = $clog2(W + 1);

  always_comb begin
    logic [DW-1:0] best, hdist, metric;
    logic [W-1:0]  cw;
    best = DW'(W);
    info = '0;
    for (int unsigned a = 0; a < (1 << M1); a++) begin
      for (int unsigned b = 0; b < W; b++) begin
        logic [M1-1:0] bi;
        bi = M1'(b);
        cw[b] = ^(M1'(a) & ~bi);
      end
      hdist = DW'($countones(cw ^ code));
      metric = (hdist <= DW'(W) - hdist) ? hdist : DW'(W) - hdist;
      if (metric < best) begin
        best = metric;
        info = {(hdist > DW'(W) - hdist), M1'(a)};
      end
    end
  end
endmodule
