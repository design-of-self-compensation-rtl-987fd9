// tb_twiddle_rom -- every entry of the W128 table used by the first FFT stage
// and of the W64 table of the second is compared with cos and -sin rounded to
// 9 fraction bits (+1.0 saturating to 511).
module tb_twiddle_rom;
  localparam real PI = 3.14159265358979323846;
  int checks = 0, failures = 0;
  logic [5:0] a;
  logic signed [9:0] r128, i128, r64, i64;

  twiddle_rom #(.P(128), .DEPTH(64), .TW_W(10)) u128 (.addr(a), .re(r128), .im(i128));
  twiddle_rom #(.P(64),  .DEPTH(64), .TW_W(10)) u64  (.addr(a), .re(r64),  .im(i64));

  function automatic int q(input real v);
    int x;
    x = int'($floor(v * 512.0 + 0.5));
    if (x > 511) x = 511;
    return x;
  endfunction

  task automatic cmp(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s entry %0d: %0d, expected %0d", what, a, got, exp);
    end
  endtask

  initial begin
    for (int e = 0; e < 64; e++) begin
      a = 6'(e);
      #1;
      cmp("W128 re", int'(r128), q( $cos(2*PI*e/128)));
      cmp("W128 im", int'(i128), q(-$sin(2*PI*e/128)));
      cmp("W64 re",  int'(r64),  q( $cos(2*PI*e/64)));
      cmp("W64 im",  int'(i64),  q(-$sin(2*PI*e/64)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
