// tb_fama_accel: end-to-end test of the FAMA accelerator at its default size.
//
// Generates random kernel schedules, loads each into the controller, runs it
// with randomly stalling input and output ports, and checks every output word
// and, at the end, every register against a reference model that executes
// the same schedule on plain integers modulo 2^16. Register 15 is kept at zero
// and register 14 is loaded with 1 first, so the schedules use all five
// templates of the unit's library:
//   T1 (X+/-Y)*A+/-K, T2 K*A+/-(X+/-Y), T3 (X+/-Y)+/-K via A = 1,
//   T4 (X+/-Y)*A via K = 0, T5 K*A via X = Y = 0,
// plus random configuration words. It counts how often each mechanism
// happens (each template, pre- and post-subtraction, input stall, output
// stall, a carry-save result reused as an operand, a CStoBin write-back later
// used as A) and fails a mechanism that never occurred. It also checks the
// cycle count: one cycle per instruction plus one per stall cycle.
module tb_fama_accel;
  import fama_pkg::*;
  localparam int NF = NFAMA;
  localparam int DEPTH = 64;
  localparam int IW = $bits(ctl_t) + NF * $bits(fama_op_t);
  localparam int NPROG = 30;
  localparam int NI = 48;
  localparam int R_ONE = NREG - 2, R_ZERO = NREG - 1;

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
  // mechanism counters
  int n_tmpl [5];
  int n_sub_pre = 0, n_sub_post = 0, n_stall_in = 0, n_stall_out = 0;
  int n_cs_reuse = 0, n_bin_as_a = 0, n_anycfg = 0;

  uinstr_t prog [NI];
  logic [15:0] din_q [$];
  logic [15:0] dout_q [$];
  logic [15:0] mval [NREG];
  logic        mbin [NREG];
  logic        mcb  [NREG];   // last written by the CStoBin path

  task automatic chk(input logic ok, input string tag);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", tag, $time); end
  endtask

  function automatic int pick_dst(ref logic [NREG-1:0] used);
    int r;
    do r = $urandom_range(NREG - 3, 0); while (used[r]);
    used[r] = 1'b1;
    return r;
  endfunction

  function automatic int pick_bin();
    int r;
    do r = $urandom_range(NREG - 1, 0); while (!mbin[r]);
    return r;
  endfunction

  // Build a schedule and, at the same time, run it on the model.
  // The model's registers carry over from one schedule to the next, as the
  // hardware's do.
  task automatic build_program();
    din_q.delete();
    dout_q.delete();
    for (int i = 0; i < NI; i++) begin
      uinstr_t in;
      logic [NREG-1:0] used;
      logic [15:0] nval [NREG];
      logic        nbin [NREG];
      logic        ncb  [NREG];
      in = '0;
      used = '0;
      for (int r = 0; r < NREG; r++) begin nval[r] = mval[r]; nbin[r] = mbin[r]; ncb[r] = mcb[r]; end
      if (i == 0) begin
        in.ctl.din_en = 1'b1; in.ctl.din_dst = REG_AW'(R_ONE);
        din_q.push_back(16'd1);
        nval[R_ONE] = 16'd1; nbin[R_ONE] = 1'b1; ncb[R_ONE] = 1'b0;
      end else begin
        for (int f = 0; f < NF; f++) begin
          fama_op_t o;
          int t;
          logic [15:0] xv, yv, kv, av, nv, mv, qv, zv;
          o = fama_op_t'({$urandom, $urandom});
          o.we = ($urandom_range(9, 0) < 8);
          t = $urandom_range(5, 0);
          o.as = REG_AW'(pick_bin());
          case (t)
            0, 3: begin o.cfg.mul_k = 1'b0; o.cfg.add_n = 1'b0; end
            1, 2, 4: begin o.cfg.mul_k = 1'b1; o.cfg.add_n = 1'b1; end
            default: ;
          endcase
          if (t == 2) o.as = REG_AW'(R_ONE);
          if (t == 3) o.ks = REG_AW'(R_ZERO);
          if (t == 4) begin o.xs = REG_AW'(R_ZERO); o.ys = REG_AW'(R_ZERO); end
          if (o.we) begin
            o.dst = REG_AW'(pick_dst(used));
            if (t < 5) n_tmpl[t]++; else n_anycfg++;
            if (o.cfg.sub_pre) n_sub_pre++;
            if (o.cfg.sub_post) n_sub_post++;
            if (!mbin[o.xs] || !mbin[o.ys] || !mbin[o.ks]) n_cs_reuse++;
            if (mcb[o.as]) n_bin_as_a++;
          end
          xv = mval[o.xs]; yv = mval[o.ys]; kv = mval[o.ks]; av = mval[o.as];
          nv = o.cfg.sub_pre ? xv - yv : xv + yv;
          mv = o.cfg.mul_k ? kv : nv;
          qv = o.cfg.add_n ? nv : kv;
          zv = o.cfg.sub_post ? 16'(mv * av) - qv : 16'(mv * av) + qv;
          if (o.we) begin nval[o.dst] = zv; nbin[o.dst] = 1'b0; ncb[o.dst] = 1'b0; end
          in.op[f] = o;
        end
        in.ctl.din_en  = ($urandom_range(9, 0) < 3);
        in.ctl.dout_en = ($urandom_range(9, 0) < 3) || (i == NI - 1);
        in.ctl.cb_we   = ($urandom_range(9, 0) < 3);
        in.ctl.cb_src  = REG_AW'($urandom);
        if (in.ctl.din_en) begin
          logic [15:0] w;
          w = 16'($urandom);
          in.ctl.din_dst = REG_AW'(pick_dst(used));
          din_q.push_back(w);
          nval[in.ctl.din_dst] = w; nbin[in.ctl.din_dst] = 1'b1; ncb[in.ctl.din_dst] = 1'b0;
        end
        if (in.ctl.cb_we) begin
          in.ctl.cb_dst = REG_AW'(pick_dst(used));
          nval[in.ctl.cb_dst] = mval[in.ctl.cb_src];
          nbin[in.ctl.cb_dst] = 1'b1; ncb[in.ctl.cb_dst] = 1'b1;
        end
        if (in.ctl.dout_en) dout_q.push_back(mval[in.ctl.cb_src]);
      end
      in.ctl.last = (i == NI - 1);
      prog[i] = in;
      for (int r = 0; r < NREG; r++) begin mval[r] = nval[r]; mbin[r] = nbin[r]; mcb[r] = ncb[r]; end
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; prog_we = 1'b0; start = 1'b0; prog_addr = '0; prog_wdata = '0;
    din = '0; din_valid = 1'b0; dout_ready = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < NREG; r++) begin mval[r] = '0; mbin[r] = 1'b1; mcb[r] = 1'b0; end
    for (int p = 0; p < NPROG; p++) begin
      int cycles, stall_cycles, nout;
      build_program();
      for (int i = 0; i < NI; i++) begin
        @(negedge clk);
        prog_we = 1'b1; prog_addr = 6'(i); prog_wdata = IW'(prog[i]);
      end
      @(negedge clk);
      prog_we = 1'b0;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cycles = 0; stall_cycles = 0; nout = 0;
      while (!done) begin
        din_valid  = ($urandom_range(3, 0) != 0);
        dout_ready = ($urandom_range(3, 0) != 0);
        din = (din_q.size() > 0) ? din_q[0] : 16'h0;
        #1;
        if (busy && dut.ctl.din_en && !din_valid) n_stall_in++;
        if (busy && dut.ctl.dout_en && !dout_ready) n_stall_out++;
        if (busy && !dut.commit) stall_cycles++;
        if (dout_valid && dout_ready) begin
          chk(dout_q.size() > 0, "unexpected output word");
          if (dout_q.size() > 0) begin
            chk(dout == dout_q[0], $sformatf("output word %0d: got %h want %h", nout, dout, dout_q[0]));
            void'(dout_q.pop_front());
          end
          nout++;
        end
        if (din_valid && din_ready) void'(din_q.pop_front());
        @(negedge clk);
        if (busy || done) cycles++;
      end
      din_valid = 1'b0; dout_ready = 1'b0;
      chk(dout_q.size() == 0, "all output words delivered");
      chk(din_q.size() == 0, "all input words taken");
      chk(cycles == NI + stall_cycles, $sformatf("cycle count %0d want %0d", cycles, NI + stall_cycles));
      for (int r = 0; r < NREG; r++) begin
        logic [15:0] v;
        v = dut.regs[r].c + dut.regs[r].s;
        chk(v == mval[r], $sformatf("register %0d = %h want %h", r, v, mval[r]));
      end
      @(negedge clk);
    end
    for (int t = 0; t < 5; t++) begin
      $display("template T%0d used %0d times", t + 1, n_tmpl[t]);
      chk(n_tmpl[t] > 0, "template used");
    end
    $display("other configuration words %0d, pre-subtractions %0d, post-subtractions %0d",
             n_anycfg, n_sub_pre, n_sub_post);
    $display("input stalls %0d, output stalls %0d, CS results reused %0d, CStoBin words used as A %0d",
             n_stall_in, n_stall_out, n_cs_reuse, n_bin_as_a);
    chk(n_anycfg > 0 && n_sub_pre > 0 && n_sub_post > 0, "sign controls used");
    chk(n_stall_in > 0 && n_stall_out > 0, "both stall kinds");
    chk(n_cs_reuse > 0, "carry-save result reused");
    chk(n_bin_as_a > 0, "CStoBin write-back used as A");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
