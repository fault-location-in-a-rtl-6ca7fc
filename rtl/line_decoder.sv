// line_decoder: binary-to-one-hot decoder.
//
// Drives exactly one of OUT_N select lines, the one whose index is in_val,
// while en is high, and none while it is low.  It serves as the row and the
// column decoder of a RAM chip (a p-tuple to 2^p lines, one-to-one and onto)
// and as the decoder that turns the m-tuple of an address into the chip
// select lines of the RAM unit.  The enable is this design's addition.
// Purely combinational.
module line_decoder #(
  parameter int unsigned IN_W  = 6,
  parameter int unsigned OUT_N = 64
) (
  input  logic [IN_W-1:0]  in_val,
  input  logic             en,
  output logic [OUT_N-1:0] sel
);
  always_comb begin
    sel = '0;
    if (en && (32'(in_val) < OUT_N)) sel[in_val] = 1'b1;
  end
endmodule
