// csa32: one row of full adders, the 3:2 carry-save adder.
//
// Adds three W-bit rows into a sum row and a carry row: s = a ^ b ^ c and
// carry = majority(a, b, c) shifted one place up. The free bit 0 of the carry
// row takes the input cin, which is how a two's complement negation's +1 is
// injected. All arithmetic is modulo 2^W. Purely combinational.
module csa32 #(
  parameter int W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-1:0] maj;

  always_comb begin
    sum   = a ^ b ^ c;
    maj   = (a & b) | (a & c) | (b & c);
    carry = {maj[W-2:0], cin};
  end
endmodule
