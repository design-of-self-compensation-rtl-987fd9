// tb_fft128_sqnr -- signal-to-quantisation-noise ratio of the 128-point FFT
// at data/twiddle widths 10, 12 and 14 (the widths whose multipliers, n = 12,
// 14 and 16, have a carry-estimation equation). The published SQNR of this
// FFT with the self-compensation multiplier is 32.40, 43.04 and 55.52 dB for
// these widths (measured with a test signal that is not specified); here
// random half-scale data is used, so the check is that every width reaches at
// least the published value and that each two extra bits gain at least 8 dB.
// At width 10 the same core is also built with the two reference multiplier
// kinds. The published figures are 33.33 dB with complete products and 24.24 dB
// with direct truncation. The check is the same order, a gain of at least 6 dB
// over direct truncation (8.2 published) and a loss of at most 3 dB against
// complete products (0.9 published).
module tb_fft128_sqnr;
  int checks = 0, failures = 0;
  logic d [3], rd [2];
  real  s [3], rs [2];
  int   bad [3], rbad [2];
  localparam real PUB [3] = '{32.40, 43.04, 55.52};

  fft_sqnr_probe #(.W(10)) p10 (.done(d[0]), .sqnr_db(s[0]), .bad_index(bad[0]));
  fft_sqnr_probe #(.W(12)) p12 (.done(d[1]), .sqnr_db(s[1]), .bad_index(bad[1]));
  fft_sqnr_probe #(.W(14)) p14 (.done(d[2]), .sqnr_db(s[2]), .bad_index(bad[2]));
  fft_sqnr_probe #(.W(10), .MODE(1)) p10t (.done(rd[0]), .sqnr_db(rs[0]), .bad_index(rbad[0]));
  fft_sqnr_probe #(.W(10), .MODE(2)) p10f (.done(rd[1]), .sqnr_db(rs[1]), .bad_index(rbad[1]));

  initial begin
    #1;    // the probes clear their done flags at time 0
    wait (d[0] && d[1] && d[2] && rd[0] && rd[1]);
    $display("W=10 with direct truncation: %0.2f dB (published 24.24), complete products: %0.2f dB (published 33.33)", rs[0], rs[1]);
    for (int i = 0; i < 3; i++) begin
      $display("W=%0d: SQNR %0.2f dB (published %0.2f dB)", 10 + 2*i, s[i], PUB[i]);
      checks += 2;
      if (bad[i] != 0) begin failures++; $display("  %0d bins missing or repeated", bad[i]); end
      if (s[i] < PUB[i]) failures++;
      if (i > 0) begin
        checks++;
        if (s[i] - s[i-1] < 8.0) failures++;
      end
    end
    // Table 4-1 ordering: complete products > self-compensation > direct
    // truncation, with most of the truncation loss recovered.
    checks += 4;
    if (rbad[0] != 0 || rbad[1] != 0) failures++;
    if (!(rs[1] > s[0] && s[0] > rs[0])) begin failures++; $display("  SQNR order wrong"); end
    if (s[0] - rs[0] < 6.0) begin failures++; $display("  gain over direct truncation below 6 dB"); end
    if (rs[1] - s[0] > 3.0) begin failures++; $display("  loss against complete products above 3 dB"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
