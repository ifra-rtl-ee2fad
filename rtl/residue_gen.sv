// residue_gen: K-bit residue of a W-bit value, modulo 2^K - 1.
//
// The footprint recorders store short residues instead of full values: a
// 2-bit residue of each register name at dispatch and a 3-bit residue of
// operands and results at issue and execute, so that offline analysis can
// check that a consumer read what its producer wrote. The modulus 2^K - 1 is
// this implementation's choice (the low-cost residue code used for checking
// arithmetic units); the recorded widths come from the design.
//
// How it works: the value is cut into K-bit digits, the digits are added,
// and the sum is folded (high part added to low part) until it fits in K
// bits, since 2^K = 1 modulo 2^K - 1. An all-ones result is the same residue
// as zero and is mapped to zero. Purely combinational, no clock.
module residue_gen #(
  parameter int unsigned W = 64,  // input width
  parameter int unsigned K = 3    // residue width, modulus 2^K - 1
) (
  input  logic [W-1:0] value,
  output logic [K-1:0] residue
);
  localparam int unsigned NDIG  = (W + K - 1) / K;
  localparam int unsigned SUM_W = K + $clog2(NDIG + 1) + 1;
  localparam int unsigned FOLDS = SUM_W;   // more folds than ever needed

  logic [NDIG*K-1:0] padded;
  logic [SUM_W-1:0]  acc;

  always_comb begin
    padded = '0;
    padded[W-1:0] = value;
    acc = '0;
    for (int unsigned d = 0; d < NDIG; d++)
      acc = acc + SUM_W'(padded[d*K +: K]);
    for (int unsigned f = 0; f < FOLDS; f++)
      acc = SUM_W'(acc[K-1:0]) + (acc >> K);
    residue = (acc[K-1:0] == {K{1'b1}}) ? '0 : acc[K-1:0];
  end

endmodule
