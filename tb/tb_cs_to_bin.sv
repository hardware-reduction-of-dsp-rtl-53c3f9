// tb_cs_to_bin: self-checking test of the CStoBin carry-propagate adder.
module tb_cs_to_bin;
  localparam int W = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0] c, s, y;
  int checks = 0, failures = 0;

  cs_to_bin #(.W(W)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) begin
      int unsigned ref_sum;
      c = W'($urandom); s = W'($urandom);
      #1;
      ref_sum = int'(c) + int'(s);
      checks++;
      if (y !== ref_sum[W-1:0]) begin
        failures++;
        $display("FAIL %h + %h gave %h", c, s, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
