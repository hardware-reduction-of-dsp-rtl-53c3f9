// tb_fama_config_reg: self-checking test of the FAMA configuration register:
// reset value, load on the clock edge, hold without load.
module tb_fama_config_reg;
  import fama_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic      rst_n, load;
  fama_cfg_t cfg_in, cfg_q, model;
  int checks = 0, failures = 0;

  fama_config_reg dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; load = 1'b1; cfg_in = 4'hF;
    @(posedge clk); #1;
    checks++;
    if (cfg_q !== '0) begin failures++; $display("FAIL reset value %h", cfg_q); end
    rst_n = 1'b1; model = '0;
    repeat (500) begin
      load = 1'($urandom); cfg_in = fama_cfg_t'($urandom);
      @(posedge clk);
      if (load) model = cfg_in;
      #1;
      checks++;
      if (cfg_q !== model) begin failures++; $display("FAIL cfg %h want %h", cfg_q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
