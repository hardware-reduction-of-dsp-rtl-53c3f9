// tb_cs_adder42: self-checking test of the 4:2 carry-save adder.
// Random and corner carry-save operands, both signs; the result rows must sum,
// modulo 2^W, to A* + B* or A* - B* computed with plain integers.
module tb_cs_adder42;
  localparam int W = 18;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0] a_c, a_s, b_c, b_s, r_c, r_s;
  logic         sub;
  int checks = 0, failures = 0;

  cs_adder42 #(.W(W)) dut (.*);

  task automatic check_one();
    logic [W-1:0] want, got;
    #1;
    want = sub ? (a_c + a_s - b_c - b_s) : (a_c + a_s + b_c + b_s);
    got  = r_c + r_s;
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL sub=%0b a=%h+%h b=%h+%h got %h want %h", sub, a_c, a_s, b_c, b_s, got, want);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // corners
    for (int i = 0; i < 16; i++) begin
      a_c = (i & 1) ? '1 : '0;  a_s = (i & 2) ? {1'b1, {(W-1){1'b0}}} : '0;
      b_c = (i & 4) ? '1 : {1'b0, {(W-1){1'b1}}}; b_s = (i & 8) ? '1 : '0;
      sub = 1'b0; check_one();
      sub = 1'b1; check_one();
    end
    repeat (4000) begin
      a_c = W'($urandom); a_s = W'($urandom); b_c = W'($urandom); b_s = W'($urandom);
      sub = 1'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
