// tb_reg_bank: self-checking test of the register bank: reset to zero,
// writes from all ports, hold without a write, and a shadow model compared
// with every register after every cycle.
module tb_reg_bank;
  import fama_pkg::*;
  localparam int NWP = NFAMA + 2;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n;
  logic [NWP-1:0] we;
  logic [REG_AW-1:0] waddr [NWP];
  cs_t wdata [NWP];
  cs_t regs [NREG];
  cs_t shadow [NREG];
  int checks = 0, failures = 0;

  reg_bank #(.NREGS(NREG), .NWP(NWP)) dut (.*);

  task automatic compare(input string tag);
    for (int r = 0; r < NREG; r++) begin
      checks++;
      if (regs[r] !== shadow[r]) begin
        failures++;
        $display("FAIL %s r%0d = %h want %h", tag, r, regs[r], shadow[r]);
      end
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; we = '0;
    for (int p = 0; p < NWP; p++) begin waddr[p] = '0; wdata[p] = '0; end
    @(posedge clk); #1;
    for (int r = 0; r < NREG; r++) shadow[r] = '0;
    compare("reset");
    rst_n = 1'b1;
    repeat (1000) begin
      // distinct addresses on the enabled ports
      logic [NREG-1:0] used;
      used = '0;
      for (int p = 0; p < NWP; p++) begin
        we[p] = 1'($urandom);
        do waddr[p] = REG_AW'($urandom); while (used[waddr[p]]);
        used[waddr[p]] = 1'b1;
        wdata[p] = cs_t'($urandom);
      end
      @(posedge clk);
      for (int p = 0; p < NWP; p++) if (we[p]) shadow[waddr[p]] = wdata[p];
      #1;
      compare("write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
