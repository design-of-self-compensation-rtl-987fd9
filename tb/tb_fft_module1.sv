// tb_fft_module1 -- three 32-beat frames of random samples, back to back,
// through the radix-2 stage. Per frame the 16 sum beats must hold exactly
// x(n2) + x(64+n2) (n2 = 4m + l), the 16 difference beats (x(n2) - x(64+n2))
// times W128^n2 within 4 LSB (fixed-width multipliers and 10-bit twiddles).
// This covers both multiplier phases: lanes 0/1 rotated before storage, lanes
// 2/3 after. The first output must appear 17 cycles after in_start. Samples
// stay within +-350 so that no rotated difference saturates.
module tb_fft_module1;
  localparam int W = 10, NF = 3;
  localparam real PI = 3.14159265358979323846;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_start = 0, in_valid = 0;
  logic signed [W-1:0] in_re [4], in_im [4];
  logic out_start, out_valid;
  logic signed [W:0] out_re [4], out_im [4];
  int xr [NF][128], xi [NF][128];
  int ocount = 0, t_in = -1, t_out = -1, cyc = 0;

  fft_module1 #(.W(W), .TW_W(10)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    if (in_start && t_in < 0) t_in = cyc;
    if (out_valid && ocount < NF*32) begin
      int f, q;
      if (ocount == 0) t_out = cyc;
      f = ocount / 32; q = ocount % 32;
      for (int l = 0; l < 4; l++) begin
        int n2;
        real er, ei, dr, di, c, s;
        n2 = 4*(q % 16) + l;
        checks++;
        if (q < 16) begin
          if (int'(out_re[l]) != xr[f][n2] + xr[f][64+n2] || int'(out_im[l]) != xi[f][n2] + xi[f][64+n2]) begin
            failures++;
            $display("frame %0d sum n2=%0d wrong", f, n2);
          end
        end else begin
          dr = xr[f][n2] - xr[f][64+n2]; di = xi[f][n2] - xi[f][64+n2];
          c = $cos(2*PI*n2/128); s = $sin(2*PI*n2/128);
          er = dr*c + di*s; ei = di*c - dr*s;
          if ((real'(out_re[l]) - er)**2 + (real'(out_im[l]) - ei)**2 > 16.0) begin
            failures++;
            $display("frame %0d diff n2=%0d: got (%0d,%0d) expected (%0.1f,%0.1f)", f, n2, out_re[l], out_im[l], er, ei);
          end
        end
      end
      ocount++;
    end
  end

  initial begin
    rst_n = 1;     // a falling edge starts the asynchronous reset
    #1 rst_n = 0;
    for (int f = 0; f < NF; f++)
      for (int n = 0; n < 128; n++) begin
        xr[f][n] = int'($urandom_range(700)) - 350;
        xi[f][n] = int'($urandom_range(700)) - 350;
      end
    for (int l = 0; l < 4; l++) begin in_re[l] = '0; in_im[l] = '0; end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int f = 0; f < NF; f++)
      for (int m = 0; m < 32; m++) begin
        in_start <= (m == 0);
        in_valid <= 1;
        for (int l = 0; l < 4; l++) begin
          in_re[l] <= W'(xr[f][4*m+l]);
          in_im[l] <= W'(xi[f][4*m+l]);
        end
        @(posedge clk);
      end
    in_valid <= 0; in_start <= 0;
    repeat (40) @(posedge clk);
    checks += 2;
    if (ocount != NF*32) begin failures++; $display("%0d output beats", ocount); end
    if (t_out - t_in != 17) begin failures++; $display("latency %0d, expected 17", t_out - t_in); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
