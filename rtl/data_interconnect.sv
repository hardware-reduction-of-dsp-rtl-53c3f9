// data_interconnect: data interconnection network of the accelerator.
//
// Read side: for every FAMA it selects, from the register bank, the carry-save
// words X*, Y*, K* and the binary word A (the first row of the named register)
// named by that FAMA's field group of the current micro-instruction, and the
// word for the CStoBin converter. Write side: it forms the register bank's
// write ports, one per FAMA (the low 16 bits of each row of Z*, that is Z*
// modulo 2^16), one for the input data port and one for the CStoBin result;
// the two binary words are stored as {word, 0}. Writes are enabled only when
// commit is high. Port order: 0..NFAMA-1 FAMAs, NFAMA data port, NFAMA+1
// CStoBin. A full crossbar of multiplexers is this design's choice.
// Combinational.
module data_interconnect
  import fama_pkg::*;
#(
  parameter int NF = fama_pkg::NFAMA
) (
  input  cs_t                regs   [NREG],
  input  fama_op_t           op     [NF],
  input  ctl_t               ctl,
  input  logic               commit,
  input  logic [2*DATA_W+1:0] z_c   [NF],
  input  logic [2*DATA_W+1:0] z_s   [NF],
  input  logic [DATA_W-1:0]  din,
  input  logic [DATA_W-1:0]  cb_y,
  output cs_t                x      [NF],
  output cs_t                y      [NF],
  output cs_t                k      [NF],
  output logic [DATA_W-1:0]  a      [NF],
  output cs_t                cb_in,
  output logic [NF+1:0]      we,
  output logic [REG_AW-1:0]  waddr  [NF+2],
  output cs_t                wdata  [NF+2]
);
  always_comb begin
    for (int f = 0; f < NF; f++) begin
      x[f] = regs[op[f].xs];
      y[f] = regs[op[f].ys];
      k[f] = regs[op[f].ks];
      a[f] = regs[op[f].as].c;
      we[f]        = commit & op[f].we;
      waddr[f]     = op[f].dst;
      wdata[f].c   = z_c[f][DATA_W-1:0];
      wdata[f].s   = z_s[f][DATA_W-1:0];
    end
    cb_in = regs[ctl.cb_src];

    we[NF]          = commit & ctl.din_en;
    waddr[NF]       = ctl.din_dst;
    wdata[NF].c     = din;
    wdata[NF].s     = '0;

    we[NF+1]        = commit & ctl.cb_we;
    waddr[NF+1]     = ctl.cb_dst;
    wdata[NF+1].c   = cb_y;
    wdata[NF+1].s   = '0;
  end
endmodule
