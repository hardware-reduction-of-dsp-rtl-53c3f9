// tb_fama: self-checking test of the Fused Add-Multiply-Add unit.
//
// For every one of the 16 configuration words it applies random carry-save
// operands and compares z_c + z_s (34-bit, signed) with the value computed
// from plain integers:
//   N = X +/- Y,  M = (CL1 ? K : N),  Q = (CL2 ? N : K),  Z = M*A +/- Q.
// It also runs the operand set of the unit's reference simulation
// (X* = -23261 + 9637, Y* = 30519 + 9653, K* = -17051 + -23130, A = -23259)
// through all configuration words, corner operands of largest magnitude, and
// checks that the configuration register changes the function only at a
// clock edge with cfg_load high.
module tb_fama;
  import fama_pkg::*;
  localparam int W = 16;
  localparam int ZW = 2 * W + 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, cfg_load;
  fama_cfg_t cfg_in, cfg;
  logic [W-1:0] x_c, x_s, y_c, y_s, k_c, k_s, a;
  logic [ZW-1:0] z_c, z_s;
  int checks = 0, failures = 0;
  int tmpl_seen [5];

  fama #(.W(W)) dut (.*);

  function automatic longint sx(input logic [W-1:0] v);
    return longint'($signed(v));
  endfunction

  function automatic longint model(input fama_cfg_t c);
    longint n, kk, m, q;
    n  = c.sub_pre ? (sx(x_c) + sx(x_s)) - (sx(y_c) + sx(y_s))
                   : (sx(x_c) + sx(x_s)) + (sx(y_c) + sx(y_s));
    kk = sx(k_c) + sx(k_s);
    m  = c.mul_k ? kk : n;
    q  = c.add_n ? n : kk;
    return c.sub_post ? m * sx(a) - q : m * sx(a) + q;
  endfunction

  task automatic load_cfg(input fama_cfg_t c);
    cfg_in = c; cfg_load = 1'b1;
    @(posedge clk); #1;
    cfg_load = 1'b0;
    cfg_in = ~c;   // must not matter until the next load
  endtask

  task automatic check_now(input fama_cfg_t c, input string tag);
    logic [ZW-1:0] sum;
    longint got, want;
    #1;
    sum  = z_c + z_s;
    got  = longint'($signed(sum));
    want = model(c);
    checks++;
    if (got != want || cfg !== c) begin
      failures++;
      $display("FAIL %s cfg=%b got %0d want %0d", tag, c, got, want);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; cfg_load = 1'b0; cfg_in = '0;
    {x_c, x_s, y_c, y_s, k_c, k_s, a} = '0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    checks++;
    if (cfg !== '0) begin failures++; $display("FAIL reset configuration %b", cfg); end

    // Reference operand set, all 16 configuration words.
    for (int c = 0; c < 16; c++) begin
      load_cfg(fama_cfg_t'(c));
      x_c = W'(-23261); x_s = W'(9637); y_c = W'(30519); y_s = W'(9653);
      k_c = W'(-17051); k_s = W'(-23130); a = W'(-23259);
      check_now(fama_cfg_t'(c), "ref");
    end

    // Random operands per configuration word, and largest magnitudes.
    for (int c = 0; c < 16; c++) begin
      load_cfg(fama_cfg_t'(c));
      repeat (300) begin
        {x_c, x_s, y_c, y_s, k_c, k_s, a} = {$urandom, $urandom, $urandom, $urandom};
        check_now(fama_cfg_t'(c), "rand");
      end
      for (int e = 0; e < 4; e++) begin
        x_c = (e & 1) ? 16'h8000 : 16'h7FFF; x_s = x_c;
        y_c = (e & 2) ? 16'h8000 : 16'h7FFF; y_s = y_c;
        k_c = (e & 1) ? 16'h7FFF : 16'h8000; k_s = k_c;
        a   = (e & 2) ? 16'h8000 : 16'h7FFF;
        check_now(fama_cfg_t'(c), "corner");
      end
    end

    // The five templates as the schedule maps them (see README):
    // T1 N*A+K, T2 K*A+N, T3 N+K (T2 with A = 1), T4 N*A (T1 with K = 0),
    // T5 K*A (T2 with X = Y = 0).
    for (int t = 0; t < 5; t++) begin
      fama_cfg_t c;
      c = (t == 0 || t == 3) ? CFG_T1 : CFG_T2;
      c.sub_pre = 1'($urandom); c.sub_post = 1'($urandom);
      load_cfg(c);
      repeat (50) begin
        {x_c, x_s, y_c, y_s, k_c, k_s, a} = {$urandom, $urandom, $urandom, $urandom};
        if (t == 2) a = 16'd1;
        if (t == 3) begin k_c = '0; k_s = '0; end
        if (t == 4) begin x_c = '0; x_s = '0; y_c = '0; y_s = '0; end
        check_now(c, "template");
      end
      tmpl_seen[t]++;
    end

    // Without cfg_load the stored word stays in force.
    load_cfg(fama_cfg_t'(4'b0101));
    cfg_in = 4'b1010;
    @(posedge clk);
    {x_c, x_s, y_c, y_s, k_c, k_s, a} = {$urandom, $urandom, $urandom, $urandom};
    check_now(fama_cfg_t'(4'b0101), "hold");

    for (int t = 0; t < 5; t++) begin
      checks++;
      if (tmpl_seen[t] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
