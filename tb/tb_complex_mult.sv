// tb_complex_mult -- random samples and twiddle factors (unit magnitude, 10-bit)
// through the complex multiplier at the FFT's data width (11 bits). Each
// component must lie within 4 LSB of the exact complex product computed in
// floating point from the same quantised operands (each fixed-width product
// may be off by up to about two LSB), and the mean error must be small (no bias
// larger than half an LSB). Samples stay within +-700 so that no result
// saturates.
module tb_complex_mult;
  localparam real PI = 3.14159265358979323846;
  int checks = 0, failures = 0;
  logic signed [10:0] ar, ai, pr, pi;
  logic signed [9:0]  wr, wi;
  real sum_err = 0.0;

  complex_mult #(.DW(11), .TW_W(10)) dut (.*);

  initial begin
    for (int t = 0; t < 20000; t++) begin
      real ang, er, ei, fr, fi;
      ar  = 11'(int'($urandom_range(1400)) - 700);
      ai  = 11'(int'($urandom_range(1400)) - 700);
      ang = 2.0 * PI * real'($urandom_range(1023)) / 1024.0;
      wr  = 10'(int'($floor(511.0 * $cos(ang) + 0.5)));
      wi  = 10'(int'($floor(511.0 * $sin(ang) + 0.5)));
      #1;
      fr = (real'(ar) * real'(wr) - real'(ai) * real'(wi)) / 512.0;
      fi = (real'(ar) * real'(wi) + real'(ai) * real'(wr)) / 512.0;
      er = real'(pr) - fr;
      ei = real'(pi) - fi;
      sum_err += er + ei;
      checks++;
      if (er > 4.0 || er < -4.0 || ei > 4.0 || ei < -4.0) begin
        failures++;
        if (failures < 5)
          $display("(%0d,%0d)*(%0d,%0d): got (%0d,%0d), exact (%0.2f,%0.2f)", ar, ai, wr, wi, pr, pi, fr, fi);
      end
    end
    checks++;
    $display("mean error %0.3f LSB", sum_err / 40000.0);
    if (sum_err / 40000.0 > 0.5 || sum_err / 40000.0 < -0.5) failures++;
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
