// control_unit: micro-programmed controller of the FAMA accelerator.
//
// A kernel is mapped off-line into a schedule of micro-instructions, one per
// cycle; the controller is the state machine that plays it. It holds the
// schedule in a DEPTH-entry program memory written through prog_we /
// prog_addr / prog_wdata while idle. A start pulse fetches entry 0; each
// instruction then sits in the instruction register for one cycle (longer if
// it stalls) and drives register selections, FAMA write-backs, data-port and
// CStoBin transfers. The next instruction's FAMA configuration words are
// presented on cfg_next with cfg_load, so each FAMA's configuration register
// is loaded at the same edge as the instruction register.
//
// Stalls: an instruction that takes a word from the input port waits for
// din_valid, one that sends a word waits for dout_ready; while it waits,
// commit is low and nothing is written. The instruction with ctl.last set ends
// the kernel: done pulses for one cycle after it commits. The instruction
// format and the handshakes are this design's choices.
module control_unit
  import fama_pkg::*;
#(
  parameter int NF    = fama_pkg::NFAMA,
  parameter int DEPTH = 64,
  localparam int IW   = $bits(ctl_t) + NF * $bits(fama_op_t),
  localparam int PAW  = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            prog_we,
  input  logic [PAW-1:0]  prog_addr,
  input  logic [IW-1:0]   prog_wdata,
  input  logic            start,
  output logic            busy,
  output logic            done,
  input  logic            din_valid,
  output logic            din_ready,
  output logic            dout_valid,
  input  logic            dout_ready,
  output ctl_t            ctl,
  output fama_op_t        op       [NF],
  output logic            commit,
  output logic            cfg_load,
  output fama_cfg_t       cfg_next [NF]
);
  typedef struct packed {
    ctl_t                 ctl;
    fama_op_t [NF-1:0]    op;
  } uinstr_t;

  typedef enum logic {S_IDLE, S_RUN} state_t;

  uinstr_t        prog [DEPTH];
  uinstr_t        instr_q, fetched;
  state_t         state;
  logic [PAW-1:0] pc, fetch_addr;
  logic           stall, fetch;

  always_ff @(posedge clk) begin
    if (prog_we && state == S_IDLE) prog[prog_addr] <= uinstr_t'(prog_wdata);
  end

  always_comb begin
    fetch_addr = (state == S_IDLE) ? '0 : pc;
    fetched    = prog[fetch_addr];
    stall      = (instr_q.ctl.din_en && !din_valid) || (instr_q.ctl.dout_en && !dout_ready);
    commit     = (state == S_RUN) && !stall;
    fetch      = (state == S_IDLE && start) || (commit && !instr_q.ctl.last);
    cfg_load   = fetch;
    for (int f = 0; f < NF; f++) begin
      cfg_next[f] = fetched.op[f].cfg;
      op[f]       = instr_q.op[f];
    end
    ctl        = instr_q.ctl;
    busy       = (state == S_RUN);
    din_ready  = (state == S_RUN) && instr_q.ctl.din_en && (!instr_q.ctl.dout_en || dout_ready);
    dout_valid = (state == S_RUN) && instr_q.ctl.dout_en && (!instr_q.ctl.din_en || din_valid);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      pc      <= '0;
      instr_q <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (fetch) begin
        instr_q <= fetched;
        pc      <= fetch_addr + 1'b1;
        state   <= S_RUN;
      end else if (commit && instr_q.ctl.last) begin
        instr_q <= '0;
        state   <= S_IDLE;
        done    <= 1'b1;
      end
    end
  end

  // The program may only be rewritten while no kernel runs.
  a_prog_idle: assert property (@(posedge clk) disable iff (!rst_n) prog_we |-> state == S_IDLE)
    else $error("control_unit: program written while running");
endmodule
