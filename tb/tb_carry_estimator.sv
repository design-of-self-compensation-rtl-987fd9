// tb_carry_estimator -- for every width with a carry-estimation equation
// (n = 8..16) and every LP_major pattern, the number of carry bits that are 1
// must equal the equation: floor(beta/2)+1 (n=8), floor((beta+1)/2)+1
// (n=10,12,14), floor(beta/2)+2 (n=16), beta being the number of ones.
module tb_carry_estimator;
  int checks = 0, failures = 0;

  logic [3:0] l8;  logic [6:0]  c8;
  logic [4:0] l10; logic [7:0]  c10;
  logic [5:0] l12; logic [8:0]  c12;
  logic [6:0] l14; logic [9:0]  c14;
  logic [7:0] l16; logic [10:0] c16;
  carry_estimator #(.N(8))  u8  (.lp_major(l8),  .carry(c8));
  carry_estimator #(.N(10)) u10 (.lp_major(l10), .carry(c10));
  carry_estimator #(.N(12)) u12 (.lp_major(l12), .carry(c12));
  carry_estimator #(.N(14)) u14 (.lp_major(l14), .carry(c14));
  carry_estimator #(.N(16)) u16 (.lp_major(l16), .carry(c16));

  task automatic check(input int n, input int beta, input int got);
    int exp;
    if (n == 8)       exp = beta/2 + 1;
    else if (n == 16) exp = beta/2 + 2;
    else              exp = (beta+1)/2 + 1;
    checks++;
    if (got != exp) begin
      failures++;
      $display("n=%0d beta=%0d: carry %0d, expected %0d", n, beta, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 256; v++) begin
      l8 = 4'(v); l10 = 5'(v); l12 = 6'(v); l14 = 7'(v); l16 = 8'(v);
      #1;
      if (v < 16)  check(8,  $countones(l8),  $countones(c8));
      if (v < 32)  check(10, $countones(l10), $countones(c10));
      if (v < 64)  check(12, $countones(l12), $countones(c12));
      if (v < 128) check(14, $countones(l14), $countones(c14));
      check(16, $countones(l16), $countones(c16));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
