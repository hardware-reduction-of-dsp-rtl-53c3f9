// cs_sd_recoder: carry-save to signed-digit recoding, digits in {-1, 0, 1}.
//
// The N-bit two's complement carry-save operand B* = {c, s} is rewritten as
// B = sum_{j=0..N} D_j 2^j with D_j in {-1, 0, 1}, and each digit is given in
// sign-magnitude form (sgn[j], mag[j]) for partial product generation. The
// recoding has no carry propagation at all: with h_i = c_i ^ s_i and
// g_i = c_i & s_i, every position satisfies c_i + s_i = 2(c_i | s_i) - h_i, so
//   D_0 = -h_0,  D_j = (c_{j-1} | s_{j-1}) - h_j  for 0 < j < N,
//   D_N = -g_{N-1}  (the negative weight of the two sign bits folded in).
// The digit range follows the description of the unit; this particular
// carry-free rule is this design's choice. Combinational.
module cs_sd_recoder #(
  parameter int N = 18
) (
  input  logic [N-1:0] c,
  input  logic [N-1:0] s,
  output logic [N:0]   sgn,   // 1: digit is negative
  output logic [N:0]   mag    // 1: digit is nonzero
);
  logic [N-1:0] h, o;
  logic [N:0]   pos, neg;

  always_comb begin
    h   = c ^ s;
    o   = c | s;
    pos = {1'b0, o[N-2:0], 1'b0};
    neg = {c[N-1] & s[N-1], h};
    mag = pos ^ neg;
    sgn = neg & ~pos;
  end
endmodule
