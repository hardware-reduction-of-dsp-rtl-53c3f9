// tb_cs_sd_recoder: self-checking test of the carry-save to signed-digit
// recoder. The weighted digit sum sum_j D_j 2^j must equal the signed value
// c + s of the operand, and every digit must be a valid sign-magnitude digit.
module tb_cs_sd_recoder;
  localparam int N = 18;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] c, s;
  logic [N:0]   sgn, mag;
  int checks = 0, failures = 0;

  cs_sd_recoder #(.N(N)) dut (.*);

  task automatic check_one();
    longint want, got;
    #1;
    want = longint'($signed(c)) + longint'($signed(s));
    got  = 0;
    for (int j = 0; j <= N; j++) begin
      if (mag[j]) got += sgn[j] ? -(64'sd1 <<< j) : (64'sd1 <<< j);
    end
    checks++;
    if (got != want || (sgn & ~mag) != '0) begin
      failures++;
      $display("FAIL c=%h s=%h digits give %0d want %0d", c, s, got, want);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    c = {1'b1, {(N-1){1'b0}}}; s = c;  check_one();   // most negative
    c = {1'b0, {(N-1){1'b1}}}; s = c;  check_one();   // most positive
    c = '1; s = '1;                    check_one();
    c = '0; s = '0;                    check_one();
    repeat (5000) begin
      c = N'($urandom); s = N'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
