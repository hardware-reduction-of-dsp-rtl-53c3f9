// tb_cs_multiplier: self-checking test of the carry-save multiplier.
// The product rows must sum, modulo 2^PW and read as signed, to
// (b_c + b_s) * a computed with plain integers; corners include the largest
// magnitudes of both operands. The value of B* is kept within NB-bit two's
// complement range, the multiplier's operating range.
module tb_cs_multiplier;
  localparam int NB = 18, AW = 16, PW = 34;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [NB-1:0] b_c, b_s;
  logic [AW-1:0] a;
  logic [PW-1:0] p_c, p_s;
  int checks = 0, failures = 0;

  cs_multiplier #(.NB(NB), .AW(AW), .PW(PW)) dut (.*);

  task automatic check_one();
    longint want, got;
    logic [PW-1:0] sum;
    #1;
    want = (longint'($signed(b_c)) + longint'($signed(b_s))) * longint'($signed(a));
    sum  = p_c + p_s;
    got  = longint'($signed(sum));
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL b=%h+%h a=%h got %0d want %0d", b_c, b_s, a, got, want);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // B* = -2^(NB-1) as two rows of -2^(NB-2), and the largest positive B*
    b_c = {2'b11, {(NB-2){1'b0}}}; b_s = b_c; a = {1'b1, {(AW-1){1'b0}}}; check_one();
    b_c = {2'b00, {(NB-2){1'b1}}}; b_s = b_c; a = {1'b1, {(AW-1){1'b0}}}; check_one();
    b_c = {2'b00, {(NB-2){1'b1}}}; b_s = b_c; a = {1'b0, {(AW-1){1'b1}}}; check_one();
    b_c = {1'b1, {(NB-1){1'b0}}}; b_s = '0; a = {1'b1, {(AW-1){1'b0}}}; check_one();
    b_c = '1; b_s = '1; a = '1; check_one();
    b_c = 1;  b_s = 0;  a = 1;  check_one();
    repeat (5000) begin
      // the value of B* must itself fit in NB bits, as it does in the FAMA
      do begin
        b_c = NB'($urandom); b_s = NB'($urandom);
      end while (longint'($signed(b_c)) + longint'($signed(b_s)) >= (64'sd1 <<< (NB-1)) ||
                 longint'($signed(b_c)) + longint'($signed(b_s)) < -(64'sd1 <<< (NB-1)));
      a = AW'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
