// tb_cs_mux: self-checking test of the 4-to-2 carry-save multiplexer.
module tb_cs_mux;
  localparam int W = 18;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         sel;
  logic [W-1:0] in0_c, in0_s, in1_c, in1_s, out_c, out_s;
  int checks = 0, failures = 0;

  cs_mux #(.W(W)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) begin
      in0_c = W'($urandom); in0_s = W'($urandom); in1_c = W'($urandom); in1_s = W'($urandom);
      sel = 1'($urandom);
      #1;
      checks++;
      if ({out_c, out_s} !== (sel ? {in1_c, in1_s} : {in0_c, in0_s})) begin
        failures++;
        $display("FAIL sel=%0b out=%h/%h", sel, out_c, out_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
