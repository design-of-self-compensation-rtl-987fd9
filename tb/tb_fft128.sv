// tb_fft128 -- end-to-end test of the four-path 128-point FFT core.
// Sends NF frames back to back (random full-scale noise, single tones, a DC
// frame and an impulse), collects the 128 results of every frame through
// out_idx, and compares them with a double-precision DFT scaled by 1/8 (the
// core grows 7 bits but drops 3 after the second stage). Checks: every index
// appears once per frame, the first result appears 38 cycles after in_start,
// each bin's error is below 40 LSB and the SQNR of every frame but the impulse
// (whose signal power is tiny) is above 35 dB. The bound leaves room for the
// multipliers' compensation bias: a zero twiddle component still receives the
// estimated carry, so each such product is off by about one LSB.
module tb_fft128;
  import scfw_pkg::*;
  localparam int W  = 10;
  localparam int NF = 6;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  logic in_start = 0, in_valid = 0;
  logic signed [W-1:0] in_re [LANES], in_im [LANES];
  logic out_start, out_valid;
  logic signed [W+3:0] out_re [LANES], out_im [LANES];
  logic [6:0] out_idx [LANES];

  int checks = 0, failures = 0;
  int xr [NF][128], xi [NF][128];
  int yr [NF][128], yi [NF][128];
  int seen [NF][128];
  int frame_out = 0, beat_out = 0;
  longint cyc = 0, t_start = -1, t_first_out = -1;

  fft128 #(.W(W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  // Stimulus.
  initial begin
    rst_n = 1;     // a falling edge starts the asynchronous reset
    #1 rst_n = 0;
    for (int f = 0; f < NF; f++)
      for (int n = 0; n < 128; n++) begin
        case (f)
          0: begin xr[f][n] = 0; xi[f][n] = 0; if (n == 0) xr[f][n] = 400; end  // impulse
          1: begin xr[f][n] = 300; xi[f][n] = -200; end                         // DC
          2: begin xr[f][n] = int'($floor(400.0*$cos(2*PI*5*n/128) + 0.5));
                   xi[f][n] = int'($floor(400.0*$sin(2*PI*5*n/128) + 0.5)); end  // tone, bin 5
          3: begin xr[f][n] = int'($floor(350.0*$cos(2*PI*37*n/128) + 0.5));
                   xi[f][n] = int'($floor(-350.0*$sin(2*PI*37*n/128) + 0.5)); end // tone, bin 91
          default: begin xr[f][n] = int'($urandom_range(1023)) - 512;
                         xi[f][n] = int'($urandom_range(1023)) - 512; end
        endcase
      end
    for (int l = 0; l < LANES; l++) begin in_re[l] = '0; in_im[l] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int f = 0; f < NF; f++)
      for (int m = 0; m < 32; m++) begin
        in_start <= (m == 0);
        in_valid <= 1;
        for (int l = 0; l < LANES; l++) begin
          in_re[l] <= W'(xr[f][4*m+l]);
          in_im[l] <= W'(xi[f][4*m+l]);
        end
        @(posedge clk);
      end
    in_start <= 0;
    in_valid <= 0;
  end

  // Output collection.
  always @(posedge clk) begin
    if (in_start && t_start < 0) t_start = cyc;
    if (out_valid && frame_out < NF) begin
      if (out_start && t_first_out < 0) t_first_out = cyc;
      for (int l = 0; l < LANES; l++) begin
        yr[frame_out][out_idx[l]] = int'(out_re[l]);
        yi[frame_out][out_idx[l]] = int'(out_im[l]);
        seen[frame_out][out_idx[l]]++;
      end
      beat_out++;
      if (beat_out == 32) begin beat_out = 0; frame_out++; end
    end
  end

  initial begin
    wait (frame_out == NF);
    checks++;
    if (t_first_out - t_start != 38) begin
      failures++;
      $display("latency %0d cycles, expected 38", t_first_out - t_start);
    end
    for (int f = 0; f < NF; f++) begin
      real ps, pe, worst;
      ps = 0; pe = 0; worst = 0;
      for (int k = 0; k < 128; k++) begin
        real rr, ri, er, ei, e;
        checks++;
        if (seen[f][k] != 1) begin
          failures++;
          $display("frame %0d: bin %0d delivered %0d times", f, k, seen[f][k]);
        end
        rr = 0; ri = 0;
        for (int n = 0; n < 128; n++) begin
          rr += xr[f][n]*$cos(2*PI*k*n/128) + xi[f][n]*$sin(2*PI*k*n/128);
          ri += xi[f][n]*$cos(2*PI*k*n/128) - xr[f][n]*$sin(2*PI*k*n/128);
        end
        rr /= 8.0; ri /= 8.0;
        er = yr[f][k] - rr; ei = yi[f][k] - ri;
        e  = $sqrt(er*er + ei*ei);
        if (e > worst) worst = e;
        ps += rr*rr + ri*ri; pe += er*er + ei*ei;
        checks++;
        if (e > 40.0) begin
          failures++;
          if (failures < 10)
            $display("frame %0d bin %0d: got (%0d,%0d) expected (%0.1f,%0.1f)", f, k, yr[f][k], yi[f][k], rr, ri);
        end
      end
      checks++;
      $display("frame %0d: SQNR %0.2f dB, worst bin error %0.2f LSB", f, 10*$log10(ps/pe), worst);
      if (f > 0 && 10*$log10(ps/pe) < 35.0) failures++;
    end
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
