// fama: Fused Add-Multiply-Add unit working on carry-save operands.
//
// Computes, entirely in carry-save (CS) form and without carry propagation,
//   CL1 = 0: Z* = (X* +/- Y*) x A  +/-  (K* if CL2 = 0, N* if CL2 = 1)
//   CL1 = 1: Z* =  K*         x A  +/-  (K* if CL2 = 0, N* if CL2 = 1)
// with N* = X* + Y* (CL0 = 0) or X* - Y* (CL0 = 1) and a final + (CL3 = 0) or
// - (CL3 = 1). The two useful settings are the unit's equations
//   Z* = N* x A + K*   and   Z* = K* x A + N*.
// X*, Y*, K* are CS pairs of W-bit two's complement rows (a binary number is
// a CS pair with one row zero); A is a W-bit two's complement number.
//
// Structure, following the unit's block diagram: an upper 4:2 CS adder for
// N*, a 4-to-2 multiplexer choosing the multiplicand, the CS multiplier
// (signed-digit recoding, partial products, 4:2 tree), a second 4-to-2
// multiplexer choosing the addend, a lower 4:2 CS adder, and the
// configuration register holding CL0..CL3.
//
// Widths (this design's choice, so that Z* is exact for every input): N* is
// W+2 bits, Z* is 2W+2 bits, each row sign-extended. The value of Z* is
// z_c + z_s modulo 2^(2W+2), read as two's complement.
//
// Timing: the configuration word is stored at a rising edge when cfg_load is
// high and applies from then on; the arithmetic path is combinational.
module fama
  import fama_pkg::*;
#(
  parameter int W = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cfg_load,
  input  fama_cfg_t       cfg_in,
  input  logic [W-1:0]    x_c,
  input  logic [W-1:0]    x_s,
  input  logic [W-1:0]    y_c,
  input  logic [W-1:0]    y_s,
  input  logic [W-1:0]    k_c,
  input  logic [W-1:0]    k_s,
  input  logic [W-1:0]    a,
  output fama_cfg_t       cfg,
  output logic [2*W+1:0]  z_c,
  output logic [2*W+1:0]  z_s
);
  localparam int NW = W + 2;       // width of N* and of the multiplicand
  localparam int ZW = 2 * W + 2;   // width of the product and of Z*

  logic [NW-1:0] xc_e, xs_e, yc_e, ys_e, kc_e, ks_e;
  logic [NW-1:0] n_c, n_s;       // N* = X* +/- Y*
  logic [NW-1:0] m_c, m_s;       // multiplicand
  logic [NW-1:0] q_c, q_s;       // addend of the lower adder
  logic [ZW-1:0] p_c, p_s;       // product A x multiplicand

  fama_config_reg u_cfg (.clk(clk), .rst_n(rst_n), .load(cfg_load), .cfg_in(cfg_in), .cfg_q(cfg));

  always_comb begin
    xc_e = NW'($signed(x_c));
    xs_e = NW'($signed(x_s));
    yc_e = NW'($signed(y_c));
    ys_e = NW'($signed(y_s));
    kc_e = NW'($signed(k_c));
    ks_e = NW'($signed(k_s));
  end

  cs_adder42 #(.W(NW)) u_pre (
    .a_c(xc_e), .a_s(xs_e), .b_c(yc_e), .b_s(ys_e), .sub(cfg.sub_pre),
    .r_c(n_c), .r_s(n_s)
  );

  cs_mux #(.W(NW)) u_mux_mul (
    .sel(cfg.mul_k), .in0_c(n_c), .in0_s(n_s), .in1_c(kc_e), .in1_s(ks_e),
    .out_c(m_c), .out_s(m_s)
  );

  cs_mux #(.W(NW)) u_mux_add (
    .sel(cfg.add_n), .in0_c(kc_e), .in0_s(ks_e), .in1_c(n_c), .in1_s(n_s),
    .out_c(q_c), .out_s(q_s)
  );

  cs_multiplier #(.NB(NW), .AW(W), .PW(ZW)) u_mul (
    .b_c(m_c), .b_s(m_s), .a(a), .p_c(p_c), .p_s(p_s)
  );

  cs_adder42 #(.W(ZW)) u_post (
    .a_c(p_c), .a_s(p_s),
    .b_c(ZW'($signed(q_c))), .b_s(ZW'($signed(q_s))),
    .sub(cfg.sub_post),
    .r_c(z_c), .r_s(z_s)
  );
endmodule
