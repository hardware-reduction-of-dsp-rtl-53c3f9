// tb_control_unit: self-checking test of the micro-programmed controller.
//
// Loads a random schedule (some instructions using the input or output port,
// the last one marked), runs it twice with random port readiness, and checks
// cycle by cycle that: the instruction in force is the expected one, commit is
// low exactly while a port handshake is pending, the configuration words
// presented with cfg_load belong to the instruction about to start, done
// pulses once after the last instruction, and the run takes one cycle per
// instruction plus one per stall cycle.
module tb_control_unit;
  import fama_pkg::*;
  localparam int NF = NFAMA;
  localparam int DEPTH = 64;
  localparam int IW = $bits(ctl_t) + NF * $bits(fama_op_t);
  localparam int NI = 12;

  typedef struct packed {
    ctl_t ctl;
    fama_op_t [NF-1:0] op;
  } uinstr_t;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, prog_we, start, busy, done, din_valid, din_ready, dout_valid, dout_ready;
  logic [$clog2(DEPTH)-1:0] prog_addr;
  logic [IW-1:0] prog_wdata;
  ctl_t ctl;
  fama_op_t op [NF];
  logic commit, cfg_load;
  fama_cfg_t cfg_next [NF];
  uinstr_t prog [NI];
  int checks = 0, failures = 0;
  int stalls_in = 0, stalls_out = 0;

  control_unit #(.NF(NF), .DEPTH(DEPTH)) dut (.*);

  task automatic chk(input logic ok, input string tag);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", tag, $time); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; prog_we = 1'b0; start = 1'b0; din_valid = 1'b0; dout_ready = 1'b0;
    prog_addr = '0; prog_wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NI; i++) begin
      prog[i] = uinstr_t'({$urandom, $urandom, $urandom, $urandom});
      prog[i].ctl.last    = (i == NI - 1);
      prog[i].ctl.din_en  = (i % 3 == 1);
      prog[i].ctl.dout_en = (i % 4 == 2) || (i == 7);
      @(negedge clk);
      prog_we = 1'b1; prog_addr = 6'(i); prog_wdata = IW'(prog[i]);
    end
    @(negedge clk);
    prog_we = 1'b0;

    for (int run = 0; run < 2; run++) begin
      int idx, cycles, stall_cycles;
      @(negedge clk);
      chk(!busy, "idle before start");
      start = 1'b1;
      #1;
      chk(cfg_load, "cfg_load with start");
      for (int f = 0; f < NF; f++) chk(cfg_next[f] == prog[0].op[f].cfg, "first cfg");
      @(negedge clk);
      start = 1'b0;
      idx = 0; cycles = 0; stall_cycles = 0;
      while (busy) begin
        logic want_commit;
        din_valid  = 1'($urandom);
        dout_ready = 1'($urandom);
        #1;
        chk(ctl == prog[idx].ctl, "ctl fields");
        for (int f = 0; f < NF; f++) chk(op[f] == prog[idx].op[f], "op fields");
        want_commit = !(prog[idx].ctl.din_en && !din_valid) && !(prog[idx].ctl.dout_en && !dout_ready);
        chk(commit == want_commit, "commit");
        chk(din_ready == (prog[idx].ctl.din_en && (!prog[idx].ctl.dout_en || dout_ready)), "din_ready");
        chk(dout_valid == (prog[idx].ctl.dout_en && (!prog[idx].ctl.din_en || din_valid)), "dout_valid");
        if (!want_commit) begin
          stall_cycles++;
          if (prog[idx].ctl.din_en && !din_valid) stalls_in++;
          if (prog[idx].ctl.dout_en && !dout_ready) stalls_out++;
        end
        chk(cfg_load == (want_commit && idx < NI - 1), "cfg_load");
        if (cfg_load) for (int f = 0; f < NF; f++) chk(cfg_next[f] == prog[idx+1].op[f].cfg, "cfg_next");
        @(negedge clk);
        cycles++;
        if (want_commit) idx++;
        if (idx == NI) chk(done, "done pulse");
      end
      chk(idx == NI, "all instructions executed");
      chk(cycles == NI + stall_cycles, "cycle count");
      @(negedge clk);
      chk(!done, "done is one cycle");
    end
    chk(stalls_in > 0 && stalls_out > 0, "both stall kinds seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
