// tb_data_interconnect: self-checking test of the data interconnection
// network: operand routing for every FAMA, the CStoBin source, and the
// formation of the write ports (Z* modulo 2^16, binary words as {word, 0},
// enables gated by commit).
module tb_data_interconnect;
  import fama_pkg::*;
  localparam int NF = NFAMA;
  localparam int ZW = 2 * DATA_W + 2;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  cs_t regs [NREG];
  fama_op_t op [NF];
  ctl_t ctl;
  logic commit;
  logic [ZW-1:0] z_c [NF], z_s [NF];
  logic [DATA_W-1:0] din, cb_y;
  cs_t x [NF], y [NF], k [NF];
  logic [DATA_W-1:0] a [NF];
  cs_t cb_in;
  logic [NF+1:0] we;
  logic [REG_AW-1:0] waddr [NF+2];
  cs_t wdata [NF+2];
  int checks = 0, failures = 0;

  data_interconnect #(.NF(NF)) dut (.*);

  task automatic expect_eq(input logic [63:0] got, input logic [63:0] want, input string tag);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s got %h want %h", tag, got, want);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) begin
      for (int r = 0; r < NREG; r++) regs[r] = cs_t'($urandom);
      for (int f = 0; f < NF; f++) begin
        op[f] = fama_op_t'({$urandom, $urandom});
        z_c[f] = ZW'({$urandom, $urandom});
        z_s[f] = ZW'({$urandom, $urandom});
      end
      ctl = ctl_t'($urandom);
      commit = 1'($urandom);
      din = DATA_W'($urandom);
      cb_y = DATA_W'($urandom);
      #1;
      for (int f = 0; f < NF; f++) begin
        expect_eq(64'(x[f]), 64'(regs[op[f].xs]), "x");
        expect_eq(64'(y[f]), 64'(regs[op[f].ys]), "y");
        expect_eq(64'(k[f]), 64'(regs[op[f].ks]), "k");
        expect_eq(64'(a[f]), 64'(regs[op[f].as].c), "a");
        expect_eq(64'(we[f]), 64'(commit & op[f].we), "we");
        expect_eq(64'(waddr[f]), 64'(op[f].dst), "waddr");
        expect_eq(64'(wdata[f]), 64'({z_c[f][DATA_W-1:0], z_s[f][DATA_W-1:0]}), "wdata");
      end
      expect_eq(64'(cb_in), 64'(regs[ctl.cb_src]), "cb_in");
      expect_eq(64'(we[NF]), 64'(commit & ctl.din_en), "din we");
      expect_eq(64'(waddr[NF]), 64'(ctl.din_dst), "din addr");
      expect_eq(64'(wdata[NF]), 64'({din, 16'h0}), "din data");
      expect_eq(64'(we[NF+1]), 64'(commit & ctl.cb_we), "cb we");
      expect_eq(64'(waddr[NF+1]), 64'(ctl.cb_dst), "cb addr");
      expect_eq(64'(wdata[NF+1]), 64'({cb_y, 16'h0}), "cb data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
