// cs_mux: "4-to-2" multiplexer of the FAMA.
//
// Chooses one of two carry-save operands (two rows each, four rows in) and
// passes its two rows on: sel = 0 gives operand 0, sel = 1 operand 1. The FAMA
// uses one to pick the multiplicand (N* or K*) and one to pick the addend of
// the final adder (K* or N*). Combinational.
module cs_mux #(
  parameter int W = 18
) (
  input  logic         sel,
  input  logic [W-1:0] in0_c,
  input  logic [W-1:0] in0_s,
  input  logic [W-1:0] in1_c,
  input  logic [W-1:0] in1_s,
  output logic [W-1:0] out_c,
  output logic [W-1:0] out_s
);
  always_comb begin
    if (sel) begin
      out_c = in1_c;
      out_s = in1_s;
    end else begin
      out_c = in0_c;
      out_s = in0_s;
    end
  end
endmodule
