// cs_multiplier: carry-save multiplier of the FAMA.
//
// Multiplies the carry-save operand B* = {b_c, b_s} (NB-bit two's complement
// rows) by the two's complement binary A (AW bits) and returns the product
// P* = {p_c, p_s} in carry-save form, PW bits, with no carry-propagate adder:
//   1. cs_sd_recoder turns B* into NB+1 signed digits D_j in {-1, 0, 1}, each
//      as (sgn, mag).
//   2. Partial products SPP_j = (A xor sgn_j) & mag_j, shifted by j. A
//      negative digit contributes the one's complement of A; its missing +1
//      (bit j) is collected into one extra correction row, since all these
//      bits sit in different columns.
//   3. The NB+2 rows are reduced to two by a tree of 4:2 carry-save adders
//      (a 3:2 adder takes a leftover group of three rows).
// All rows are PW bits wide and arithmetic is modulo 2^PW; PW >= NB + AW
// makes the product exact. Combinational.
module cs_multiplier #(
  parameter int NB = 18,
  parameter int AW = 16,
  parameter int PW = 34
) (
  input  logic [NB-1:0] b_c,
  input  logic [NB-1:0] b_s,
  input  logic [AW-1:0] a,
  output logic [PW-1:0] p_c,
  output logic [PW-1:0] p_s
);
  localparam int ND = NB + 1;   // signed digits
  localparam int R0 = ND + 1;   // partial products plus the correction row

  // Rows left after one reduction level.
  function automatic int next_rows(input int r);
    if (r <= 2) return r;
    return (r / 4) * 2 + ((r % 4 == 3) ? 2 : (r % 4));
  endfunction

  function automatic int rows_at(input int lvl);
    int r = R0;
    for (int i = 0; i < lvl; i++) r = next_rows(r);
    return r;
  endfunction

  function automatic int num_levels();
    int r = R0;
    int n = 0;
    while (r > 2) begin
      r = next_rows(r);
      n++;
    end
    return n;
  endfunction

  localparam int NLEV = num_levels();

  logic [ND-1:0] sgn, mag;
  logic [PW-1:0] a_ext;
  logic [PW-1:0] pp [R0];

  cs_sd_recoder #(.N(NB)) u_rec (.c(b_c), .s(b_s), .sgn(sgn), .mag(mag));

  assign a_ext = PW'($signed(a));

  // Partial product generation (level 0 of the tree).
  for (genvar j = 0; j < ND; j++) begin : g_pp
    assign pp[j] = ((a_ext ^ {PW{sgn[j]}}) & {PW{mag[j]}}) << j;
  end
  assign pp[ND] = PW'(sgn & mag);

  // Reduction tree.
  for (genvar l = 0; l < NLEV; l++) begin : g_lvl
    localparam int RIN  = rows_at(l);
    localparam int ROUT = next_rows(RIN);
    localparam int NG   = RIN / 4;
    logic [PW-1:0] rin  [R0];
    logic [PW-1:0] rout [R0];
    if (l == 0) begin : g_first
      assign rin = pp;
    end else begin : g_next
      assign rin = g_lvl[l-1].rout;
    end
    for (genvar g = 0; g < NG; g++) begin : g_42
      cs_adder42 #(.W(PW)) u_add (
        .a_c(rin[4*g]),   .a_s(rin[4*g+1]),
        .b_c(rin[4*g+2]), .b_s(rin[4*g+3]),
        .sub(1'b0),
        .r_c(rout[2*g]), .r_s(rout[2*g+1])
      );
    end
    if (RIN % 4 == 3) begin : g_32
      csa32 #(.W(PW)) u_add (
        .a(rin[4*NG]), .b(rin[4*NG+1]), .c(rin[4*NG+2]), .cin(1'b0),
        .sum(rout[2*NG]), .carry(rout[2*NG+1])
      );
    end else begin : g_pass
      for (genvar r = 0; r < RIN % 4; r++) begin : g_r
        assign rout[2*NG+r] = rin[4*NG+r];
      end
    end
    for (genvar r = ROUT; r < R0; r++) begin : g_zero
      assign rout[r] = '0;
    end
  end

  assign p_c = g_lvl[NLEV-1].rout[0];
  assign p_s = g_lvl[NLEV-1].rout[1];
endmodule
