// cs_to_bin: the CStoBin module, a carry-propagate adder.
//
// Converts a carry-save word {c, s} into its two's complement value c + s,
// modulo 2^W. It is the only place in the datapath where a carry ripples;
// everything before it stays in carry-save form. Combinational.
module cs_to_bin #(
  parameter int W = 16
) (
  input  logic [W-1:0] c,
  input  logic [W-1:0] s,
  output logic [W-1:0] y
);
  assign y = c + s;
endmodule
