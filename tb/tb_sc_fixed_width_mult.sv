// tb_sc_fixed_width_mult -- self-checking test of the self-compensation
// fixed-width multiplier at the widths with their own carry equation:
// n = 8, 10 and 12 exhaustively, n = 14 and 16 with random operands.
// Each result is compared with an independent model (mult_checker). The mean
// absolute error (in units of the full product's LSB) must lie within 3 % of
// the published figures: 87.2, 457.9, 1652.1 and 31250 for n = 8, 10, 12, 16
// (n = 14 has none; its error must stay below a quarter of direct truncation).
// For the exhaustive widths the error variance must also lie within 5 % of
// the published variance (7.35 %, 9.05 % and 6.10 % of the direct-truncated
// variance: 3990, 106142 and 1442707).
// The two reference kinds of the same module (direct truncation, complete
// product rounded) are checked bit-exactly at n = 8 and 12, exhaustively.
module tb_sc_fixed_width_mult;
  logic start = 0;
  logic done [5], rdone [4];
  int   rc [4], rf [4];
  real  rdummy [4][3];
  int   c [5], f [5];
  real  ep [5], ed [5], ev [5];
  int   checks = 0, failures = 0;
  localparam int WIDTHS [5] = '{8, 10, 12, 14, 16};
  localparam real REF [5] = '{87.24, 457.93, 1652.06, 0.0, 31250.5};
  localparam real VREF [5] = '{3989.9, 106142.2, 1442707.5, 0.0, 0.0};

  mult_checker #(.N(8),  .EXHAUSTIVE(1)) m8  (.start, .done(done[0]), .checks(c[0]), .failures(f[0]), .avg_err_prop(ep[0]), .avg_err_direct(ed[0]), .var_err_prop(ev[0]));
  mult_checker #(.N(10), .EXHAUSTIVE(1)) m10 (.start, .done(done[1]), .checks(c[1]), .failures(f[1]), .avg_err_prop(ep[1]), .avg_err_direct(ed[1]), .var_err_prop(ev[1]));
  mult_checker #(.N(12), .EXHAUSTIVE(1)) m12 (.start, .done(done[2]), .checks(c[2]), .failures(f[2]), .avg_err_prop(ep[2]), .avg_err_direct(ed[2]), .var_err_prop(ev[2]));
  mult_checker #(.N(14), .EXHAUSTIVE(0), .SAMPLES(300000)) m14 (.start, .done(done[3]), .checks(c[3]), .failures(f[3]), .avg_err_prop(ep[3]), .avg_err_direct(ed[3]), .var_err_prop(ev[3]));
  mult_checker #(.N(16), .EXHAUSTIVE(0), .SAMPLES(300000)) m16 (.start, .done(done[4]), .checks(c[4]), .failures(f[4]), .avg_err_prop(ep[4]), .avg_err_direct(ed[4]), .var_err_prop(ev[4]));

  mult_checker #(.N(8),  .EXHAUSTIVE(1), .MODE(1)) r8t  (.start, .done(rdone[0]), .checks(rc[0]), .failures(rf[0]), .avg_err_prop(rdummy[0][0]), .avg_err_direct(rdummy[0][1]), .var_err_prop(rdummy[0][2]));
  mult_checker #(.N(8),  .EXHAUSTIVE(1), .MODE(2)) r8f  (.start, .done(rdone[1]), .checks(rc[1]), .failures(rf[1]), .avg_err_prop(rdummy[1][0]), .avg_err_direct(rdummy[1][1]), .var_err_prop(rdummy[1][2]));
  mult_checker #(.N(12), .EXHAUSTIVE(1), .MODE(1)) r12t (.start, .done(rdone[2]), .checks(rc[2]), .failures(rf[2]), .avg_err_prop(rdummy[2][0]), .avg_err_direct(rdummy[2][1]), .var_err_prop(rdummy[2][2]));
  mult_checker #(.N(12), .EXHAUSTIVE(1), .MODE(2)) r12f (.start, .done(rdone[3]), .checks(rc[3]), .failures(rf[3]), .avg_err_prop(rdummy[3][0]), .avg_err_direct(rdummy[3][1]), .var_err_prop(rdummy[3][2]));

  initial begin
    #5 start = 1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    wait (rdone[0] && rdone[1] && rdone[2] && rdone[3]);
    for (int i = 0; i < 4; i++) begin
      checks += rc[i]; failures += rf[i];
      $display("reference kind %0d, n=%0d: %0d results, %0d wrong", 1 + i % 2, i < 2 ? 8 : 12, rc[i], rf[i]);
    end
    for (int i = 0; i < 5; i++) begin
      real ratio;
      checks += c[i]; failures += f[i];
      ratio = ep[i] / ed[i];
      $display("n=%0d: %0d results, %0d wrong; mean |error| direct-truncated %0.2f, compensated %0.2f (%0.2f %%), variance %0.1f",
               WIDTHS[i], c[i], f[i], ed[i], ep[i], 100.0*ratio, ev[i]);
      checks++;
      if (REF[i] > 0.0 ? (ep[i] < 0.97*REF[i] || ep[i] > 1.03*REF[i]) : (ratio > 0.25)) begin
        failures++;
        $display("  mean error off the published %0.2f", REF[i]);
      end
      if (VREF[i] > 0.0) begin
        checks++;
        if (ev[i] < 0.95*VREF[i] || ev[i] > 1.05*VREF[i]) begin
          failures++;
          $display("  error variance off the published %0.1f", VREF[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
