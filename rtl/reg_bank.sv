// reg_bank: register bank of scratch carry-save registers.
//
// NREG registers, each a carry-save word (two 16-bit rows), hold inputs,
// intermediate results and operands shared among the FAMAs. Every register
// is visible at the outputs all the time, so the interconnect can read any
// number of them in a cycle. NWP write ports are sampled at each rising edge;
// if two enabled ports name the same register the higher-numbered port wins,
// which a correct schedule never relies on (an assertion reports it). An
// active-low synchronous reset clears every register to zero. The number of
// registers and ports and the reset are this design's choices.
module reg_bank
  import fama_pkg::*;
#(
  parameter int NREGS = fama_pkg::NREG,
  parameter int NWP   = fama_pkg::NFAMA + 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NWP-1:0]           we,
  input  logic [$clog2(NREGS)-1:0] waddr [NWP],
  input  cs_t                      wdata [NWP],
  output cs_t                      regs  [NREGS]
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < NREGS; r++) regs[r] <= '0;
    end else begin
      for (int p = 0; p < NWP; p++) begin
        if (we[p]) regs[waddr[p]] <= wdata[p];
      end
    end
  end

  // Two write ports must not target the same register in one cycle.
  for (genvar p = 0; p < NWP; p++) begin : g_chk
    for (genvar q = p + 1; q < NWP; q++) begin : g_q
      a_no_conflict: assert property (@(posedge clk) disable iff (!rst_n)
        !(we[p] && we[q] && waddr[p] == waddr[q]))
        else $error("reg_bank: ports %0d and %0d write register %0d", p, q, waddr[p]);
    end
  end
endmodule
