// fama_pkg: types and constants shared by the FAMA accelerator.
//
// Data words are 16-bit two's complement (the word length of the design). A
// carry-save (CS) word holds two such numbers whose sum is the value. In the
// register bank a CS word is read modulo 2^16, so integer kernels wrap like
// 16-bit arithmetic. The configuration word of a FAMA has four control bits
// CL0..CL3; their meaning below is this design's reading of the unit's
// multiplexers and adder sign controls. The micro-instruction layout is this
// design's own: one field group per FAMA plus data-port and CStoBin fields.
package fama_pkg;

  localparam int DATA_W = 16;                 // operand word length
  localparam int NREG   = 16;                 // scratch registers in the bank
  localparam int REG_AW = $clog2(NREG);       // register index width
  localparam int NFAMA  = 4;                  // FAMA units in the datapath

  // A carry-save word of the register bank: value = (c + s) mod 2^DATA_W.
  typedef struct packed {
    logic [DATA_W-1:0] c;
    logic [DATA_W-1:0] s;
  } cs_t;

  // FAMA configuration word, cfg[0] = CL0 ... cfg[3] = CL3.
  typedef struct packed {
    logic sub_post;  // CL3: 0 product + addend, 1 product - addend
    logic add_n;     // CL2: addend is 0 K*, 1 N*
    logic mul_k;     // CL1: multiplicand is 0 N*, 1 K*
    logic sub_pre;   // CL0: 0 N* = X* + Y*, 1 N* = X* - Y*
  } fama_cfg_t;

  // Template settings of the library T1..T5 (operand zeroing / A = 1 is done
  // by the schedule, see the README).
  localparam fama_cfg_t CFG_T1 = '{sub_post: 1'b0, add_n: 1'b0, mul_k: 1'b0, sub_pre: 1'b0};
  localparam fama_cfg_t CFG_T2 = '{sub_post: 1'b0, add_n: 1'b1, mul_k: 1'b1, sub_pre: 1'b0};

  // Per-FAMA field group of a micro-instruction.
  typedef struct packed {
    logic              we;    // write Z* (low 16 bits of each row) to dst
    logic [REG_AW-1:0] dst;
    logic [REG_AW-1:0] xs;    // register supplying X*
    logic [REG_AW-1:0] ys;    // register supplying Y*
    logic [REG_AW-1:0] ks;    // register supplying K*
    logic [REG_AW-1:0] as;    // register supplying A (must hold a binary word)
    fama_cfg_t         cfg;
  } fama_op_t;

  // Data-port and CStoBin fields of a micro-instruction.
  typedef struct packed {
    logic              last;     // final instruction of the kernel
    logic              din_en;   // take one word from the input port
    logic [REG_AW-1:0] din_dst;  //   and store it here as {word, 0}
    logic              dout_en;  // send CStoBin(cb_src) to the output port
    logic              cb_we;    // store CStoBin(cb_src) as {word, 0}
    logic [REG_AW-1:0] cb_src;
    logic [REG_AW-1:0] cb_dst;
  } ctl_t;

endpackage
