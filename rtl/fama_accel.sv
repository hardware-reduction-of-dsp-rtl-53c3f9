// fama_accel: flexible DSP accelerator datapath built from FAMA units.
//
// NF Fused Add-Multiply-Add units (fama) work side by side on carry-save
// operands taken from a register bank of scratch registers through a data
// interconnection network; their carry-save results return to the bank with
// no carry propagation. One CStoBin carry-propagate adder converts a
// register to two's complement, either for the output data port or back into
// the bank as a binary word (the FAMA operand A must be binary). A
// micro-programmed control unit plays a kernel schedule: each cycle it
// selects registers, loads every FAMA's configuration register and moves
// words between the data ports and the bank.
//
// Interface: load the schedule with prog_we/prog_addr/prog_wdata (layout:
// ctl_t then NF fama_op_t, FAMA NF-1 first), pulse start, feed input words on
// din/din_valid/din_ready, collect results on dout/dout_valid/dout_ready;
// done pulses after the last instruction. Timing: one micro-instruction per
// cycle; FAMA results are written at the end of the cycle that computes them
// and can be read by the next instruction. Stalls occur only at the ports.
// Register words are read modulo 2^16 (16-bit integer arithmetic).
module fama_accel
  import fama_pkg::*;
#(
  parameter int NF         = fama_pkg::NFAMA,
  parameter int PROG_DEPTH = 64,
  localparam int IW        = $bits(ctl_t) + NF * $bits(fama_op_t),
  localparam int PAW       = $clog2(PROG_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              prog_we,
  input  logic [PAW-1:0]    prog_addr,
  input  logic [IW-1:0]     prog_wdata,
  input  logic              start,
  output logic              busy,
  output logic              done,
  input  logic [DATA_W-1:0] din,
  input  logic              din_valid,
  output logic              din_ready,
  output logic [DATA_W-1:0] dout,
  output logic              dout_valid,
  input  logic              dout_ready
);
  localparam int ZW = 2 * DATA_W + 2;

  ctl_t              ctl;
  fama_op_t          op       [NF];
  fama_cfg_t         cfg_next [NF];
  fama_cfg_t         cfg_cur  [NF];
  logic              commit, cfg_load;
  cs_t               regs     [NREG];
  cs_t               x [NF], y [NF], k [NF];
  logic [DATA_W-1:0] a [NF];
  logic [ZW-1:0]     z_c [NF], z_s [NF];
  cs_t               cb_in;
  logic [DATA_W-1:0] cb_y;
  logic [NF+1:0]     we;
  logic [REG_AW-1:0] waddr [NF+2];
  cs_t               wdata [NF+2];

  control_unit #(.NF(NF), .DEPTH(PROG_DEPTH)) u_ctrl (
    .clk, .rst_n, .prog_we, .prog_addr, .prog_wdata, .start, .busy, .done,
    .din_valid, .din_ready, .dout_valid, .dout_ready,
    .ctl, .op, .commit, .cfg_load, .cfg_next
  );

  reg_bank #(.NREGS(NREG), .NWP(NF + 2)) u_regs (
    .clk, .rst_n, .we, .waddr, .wdata, .regs
  );

  data_interconnect #(.NF(NF)) u_net (
    .regs, .op, .ctl, .commit, .z_c, .z_s, .din, .cb_y,
    .x, .y, .k, .a, .cb_in, .we, .waddr, .wdata
  );

  for (genvar f = 0; f < NF; f++) begin : g_fama
    fama #(.W(DATA_W)) u_fama (
      .clk, .rst_n, .cfg_load, .cfg_in(cfg_next[f]),
      .x_c(x[f].c), .x_s(x[f].s), .y_c(y[f].c), .y_s(y[f].s),
      .k_c(k[f].c), .k_s(k[f].s), .a(a[f]),
      .cfg(cfg_cur[f]), .z_c(z_c[f]), .z_s(z_s[f])
    );

    // The configuration register must hold the current instruction's word.
    a_cfg_match: assert property (@(posedge clk) disable iff (!rst_n)
      busy |-> cfg_cur[f] == op[f].cfg)
      else $error("fama_accel: FAMA %0d configuration out of step", f);
    // Operand A is taken as a binary word: its register's second row is zero.
    a_a_binary: assert property (@(posedge clk) disable iff (!rst_n)
      (commit && op[f].we) |-> regs[op[f].as].s == '0)
      else $error("fama_accel: FAMA %0d reads A from a carry-save register", f);
  end

  cs_to_bin #(.W(DATA_W)) u_cs2bin (.c(cb_in.c), .s(cb_in.s), .y(cb_y));

  assign dout = cb_y;
endmodule
