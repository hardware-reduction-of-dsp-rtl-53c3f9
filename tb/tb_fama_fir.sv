// tb_fama_fir: a 4-tap FIR filter kernel mapped onto the FAMA accelerator.
//
// y[n] = h0 x[n] + h1 x[n-1] + h2 x[n-2] + h3 x[n-3]  (modulo 2^16)
//
// The schedule loads the four coefficients and the constant 1 through the
// input port, then spends four instructions per sample, keeping partial sums
// in carry-save form the whole way:
//   A: input x[n] into its delay-line slot; output y[n-1] through CStoBin
//   B: FAMA0 u0 = x[n]   h0        (T4)    FAMA1 u1 = x[n-2] h2        (T4)
//   C: FAMA0 v0 = x[n-1] h1 + u0   (T1)    FAMA1 v1 = x[n-3] h3 + u1   (T1)
//   D: FAMA2 y  = v0 * 1 + v1      (T3)
// The delay line is a ring of four registers, so no copies are needed. A
// final instruction outputs the last sample. The test compares each output
// with a direct convolution and checks the cycle count (one per instruction
// plus one per stall cycle, the ports stalling at random).
module tb_fama_fir;
  import fama_pkg::*;
  localparam int NF = NFAMA;
  localparam int DEPTH = 64;
  localparam int IW = $bits(ctl_t) + NF * $bits(fama_op_t);
  localparam int NS = 12;                    // samples
  localparam int NI = 5 + 4 * NS + 1;        // instructions
  localparam int R_U0 = 8, R_U1 = 9, R_V0 = 10, R_V1 = 11, R_Y = 12, R_ONE = 13, R_ZERO = 15;

  typedef struct packed {
    ctl_t ctl;
    fama_op_t [NF-1:0] op;
  } uinstr_t;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, prog_we, start, busy, done;
  logic [$clog2(DEPTH)-1:0] prog_addr;
  logic [IW-1:0] prog_wdata;
  logic [DATA_W-1:0] din, dout;
  logic din_valid, din_ready, dout_valid, dout_ready;

  fama_accel dut (.*);

  int checks = 0, failures = 0;
  uinstr_t prog [NI];
  logic [15:0] h [4];
  logic [15:0] x [NS];
  logic [15:0] in_q [$];
  logic [15:0] want_q [$];

  function automatic int slot(input int n);
    return 4 + ((n % 4 + 4) % 4);
  endfunction

  function automatic fama_op_t mac(input int xs, input int ks, input int as, input int dst,
                                   input fama_cfg_t cfg);
    fama_op_t o;
    o = '0;
    o.we = 1'b1; o.dst = REG_AW'(dst); o.xs = REG_AW'(xs); o.ys = REG_AW'(R_ZERO);
    o.ks = REG_AW'(ks); o.as = REG_AW'(as); o.cfg = cfg;
    return o;
  endfunction

  task automatic chk(input logic ok, input string tag);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", tag); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pc, cycles, stalls, nout;
    for (int i = 0; i < 4; i++) h[i] = 16'($urandom);
    for (int n = 0; n < NS; n++) x[n] = 16'($urandom);
    for (int n = 0; n < NS; n++) begin
      logic [15:0] acc;
      acc = '0;
      for (int i = 0; i < 4; i++) if (n - i >= 0) acc += h[i] * x[n - i];
      want_q.push_back(acc);
    end

    // Build the schedule.
    pc = 0;
    for (int i = 0; i < 5; i++) begin
      prog[pc] = '0;
      prog[pc].ctl.din_en = 1'b1;
      prog[pc].ctl.din_dst = REG_AW'((i < 4) ? i : R_ONE);
      in_q.push_back((i < 4) ? h[i] : 16'd1);
      pc++;
    end
    for (int n = 0; n < NS; n++) begin
      prog[pc] = '0;                                   // A
      prog[pc].ctl.din_en = 1'b1;
      prog[pc].ctl.din_dst = REG_AW'(slot(n));
      in_q.push_back(x[n]);
      if (n > 0) begin prog[pc].ctl.dout_en = 1'b1; prog[pc].ctl.cb_src = REG_AW'(R_Y); end
      pc++;
      prog[pc] = '0;                                   // B
      prog[pc].op[0] = mac(slot(n),     R_ZERO, 0, R_U0, CFG_T1);
      prog[pc].op[1] = mac(slot(n - 2), R_ZERO, 2, R_U1, CFG_T1);
      pc++;
      prog[pc] = '0;                                   // C
      prog[pc].op[0] = mac(slot(n - 1), R_U0, 1, R_V0, CFG_T1);
      prog[pc].op[1] = mac(slot(n - 3), R_U1, 3, R_V1, CFG_T1);
      pc++;
      prog[pc] = '0;                                   // D: K*A + N with A = 1
      prog[pc].op[2] = mac(R_V1, R_V0, R_ONE, R_Y, CFG_T2);
      pc++;
    end
    prog[pc] = '0;
    prog[pc].ctl.dout_en = 1'b1; prog[pc].ctl.cb_src = REG_AW'(R_Y); prog[pc].ctl.last = 1'b1;
    pc++;
    chk(pc == NI, "schedule length");

    rst_n = 1'b0; prog_we = 1'b0; start = 1'b0; prog_addr = '0; prog_wdata = '0;
    din = '0; din_valid = 1'b0; dout_ready = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NI; i++) begin
      @(negedge clk);
      prog_we = 1'b1; prog_addr = 6'(i); prog_wdata = IW'(prog[i]);
    end
    @(negedge clk);
    prog_we = 1'b0; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 0; stalls = 0; nout = 0;
    while (!done) begin
      din_valid  = ($urandom_range(2, 0) != 0);
      dout_ready = ($urandom_range(2, 0) != 0);
      din = (in_q.size() > 0) ? in_q[0] : '0;
      #1;
      if (busy && !dut.commit) stalls++;
      if (din_valid && din_ready) void'(in_q.pop_front());
      if (dout_valid && dout_ready) begin
        chk(want_q.size() > 0 && dout == want_q[0],
            $sformatf("y[%0d] = %h want %h", nout, dout, want_q.size() > 0 ? want_q[0] : 16'h0));
        if (want_q.size() > 0) void'(want_q.pop_front());
        nout++;
      end
      @(negedge clk);
      cycles++;
    end
    chk(nout == NS, $sformatf("%0d outputs, want %0d", nout, NS));
    chk(cycles == NI + stalls, $sformatf("cycles %0d, want %0d", cycles, NI + stalls));
    chk(stalls > 0, "ports stalled at least once");
    $display("FIR: %0d samples in %0d cycles (%0d stall cycles)", NS, cycles, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
