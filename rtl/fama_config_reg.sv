// fama_config_reg: configuration register of a FAMA.
//
// Holds the 4-bit configuration word whose bits CL0..CL3 steer the FAMA's
// multiplexers and the sign selection of its two 4:2 adders. The word is
// reloaded cycle by cycle: when load is high at a rising clock edge, cfg_in is
// stored and drives the unit during the following cycle. An active-low
// synchronous reset clears it to all zeros, the template
// Z* = (X* + Y*) x A + K*. The reset value is this design's choice.
module fama_config_reg
  import fama_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      load,
  input  fama_cfg_t cfg_in,
  output fama_cfg_t cfg_q
);
  always_ff @(posedge clk) begin
    if (!rst_n)    cfg_q <= '0;
    else if (load) cfg_q <= cfg_in;
  end
endmodule
