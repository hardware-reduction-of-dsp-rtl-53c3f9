// cs_adder42: two's complement 4:2 carry-save adder with sign selection.
//
// Computes R* = A* + B* (sub = 0) or R* = A* - B* (sub = 1) where each operand
// is a carry-save pair of W-bit two's complement rows and so is the result.
// It is two levels of 3:2 adders (csa32). For a subtraction both rows of B*
// are inverted and each level injects a +1 into the free low carry bit, which
// completes the two negations without a carry-propagate adder, as the
// adder's input carry does in the unit it belongs to. Arithmetic is modulo
// 2^W: callers sign-extend the operands so that the true result fits.
// Combinational, no clock.
module cs_adder42 #(
  parameter int W = 18
) (
  input  logic [W-1:0] a_c,
  input  logic [W-1:0] a_s,
  input  logic [W-1:0] b_c,
  input  logic [W-1:0] b_s,
  input  logic         sub,
  output logic [W-1:0] r_c,
  output logic [W-1:0] r_s
);
  logic [W-1:0] bc_x, bs_x;
  logic [W-1:0] s1, c1;

  always_comb begin
    bc_x = sub ? ~b_c : b_c;
    bs_x = sub ? ~b_s : b_s;
  end

  csa32 #(.W(W)) u_lvl1 (.a(a_c), .b(a_s), .c(bc_x), .cin(sub), .sum(s1), .carry(c1));
  csa32 #(.W(W)) u_lvl2 (.a(s1),  .b(c1),  .c(bs_x), .cin(sub), .sum(r_s), .carry(r_c));
endmodule
