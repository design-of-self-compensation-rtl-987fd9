// tb_fft_module2 -- three 32-beat frames of random samples through the second
// stage. Lane l of beat m in half h carries y(n2 = 4m + l); for output beat q
// of that half, lane l must hold, for a4 = l + 4*q[0] and
// k = q[3] + 2*q[2] + 4*q[1], the value (sum_t y(8t + a4) W8^(t*k)) / 8 times
// W64^(a4*k), within 5 LSB. The first output appears 18 cycles after in_start.
module tb_fft_module2;
  localparam int W = 11, NF = 3;
  localparam real PI = 3.14159265358979323846;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_start = 0, in_valid = 0;
  logic signed [W-1:0] in_re [4], in_im [4], out_re [4], out_im [4];
  logic out_start, out_valid;
  int yr [NF*2][64], yi [NF*2][64];
  int ocount = 0, t_in = -1, t_out = -1, cyc = 0;

  fft_module2 #(.W(W), .TW_W(10)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    if (in_start && t_in < 0) t_in = cyc;
    if (out_valid && ocount < NF*32) begin
      int h, q, k, a4;
      if (ocount == 0) t_out = cyc;
      h = ocount / 16; q = ocount % 16;
      k = ((q >> 3) & 1) + 2*((q >> 2) & 1) + 4*((q >> 1) & 1);
      for (int l = 0; l < 4; l++) begin
        real zr, zi, er, ei, c, s;
        a4 = l + 4*(q % 2);
        zr = 0; zi = 0;
        for (int t = 0; t < 8; t++) begin
          c = $cos(2*PI*t*k/8); s = $sin(2*PI*t*k/8);
          zr += yr[h][8*t+a4]*c + yi[h][8*t+a4]*s;
          zi += yi[h][8*t+a4]*c - yr[h][8*t+a4]*s;
        end
        zr /= 8.0; zi /= 8.0;
        c = $cos(2*PI*a4*k/64); s = $sin(2*PI*a4*k/64);
        er = zr*c + zi*s; ei = zi*c - zr*s;
        checks++;
        if ((real'(out_re[l]) - er)**2 + (real'(out_im[l]) - ei)**2 > 25.0) begin
          failures++;
          $display("half %0d beat %0d lane %0d: got (%0d,%0d) expected (%0.1f,%0.1f)", h, q, l, out_re[l], out_im[l], er, ei);
        end
      end
      ocount++;
    end
  end

  initial begin
    rst_n = 1;     // a falling edge starts the asynchronous reset
    #1 rst_n = 0;
    for (int h = 0; h < NF*2; h++)
      for (int n = 0; n < 64; n++) begin
        yr[h][n] = int'($urandom_range(1600)) - 800;
        yi[h][n] = int'($urandom_range(1600)) - 800;
      end
    for (int l = 0; l < 4; l++) begin in_re[l] = '0; in_im[l] = '0; end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int h = 0; h < NF*2; h++)
      for (int m = 0; m < 16; m++) begin
        in_start <= (h % 2 == 0 && m == 0);
        in_valid <= 1;
        for (int l = 0; l < 4; l++) begin
          in_re[l] <= W'(yr[h][4*m+l]);
          in_im[l] <= W'(yi[h][4*m+l]);
        end
        @(posedge clk);
      end
    in_valid <= 0; in_start <= 0;
    repeat (40) @(posedge clk);
    checks += 2;
    if (ocount != NF*32) begin failures++; $display("%0d output beats", ocount); end
    if (t_out - t_in != 18) begin failures++; $display("latency %0d, expected 18", t_out - t_in); end
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
