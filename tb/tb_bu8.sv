// tb_bu8 -- four 16-beat blocks of random samples (two interleaved 8-point
// groups each) through one BU_8. Output beat q of a block must hold, for group
// u = q[0], the 8-point DFT bin k = q[3] + 2*q[2] + 4*q[1] of that group, within
// 12 LSB (the W8^1/W8^3 shift-and-add rotations truncate). out_start must come
// 17 cycles (8+1, 4+1, 2+1) after in_start.
module tb_bu8;
  localparam int W = 11, NB = 4;
  localparam real PI = 3.14159265358979323846;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_start = 0, in_valid = 0;
  logic signed [W-1:0] in_re = '0, in_im = '0;
  logic out_start, out_valid;
  logic signed [W+2:0] out_re, out_im;
  int xr [NB*16], xi [NB*16];
  int ocount = 0, t_in = -1, t_out = -1, cyc = 0;

  bu8 #(.W(W), .IL(2)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    if (in_start && t_in < 0) t_in = cyc;
    if (out_valid && ocount < NB*16) begin
      int b, q, u, k;
      real er, ei;
      if (ocount == 0) t_out = cyc;
      b = ocount / 16; q = ocount % 16;
      u = q % 2; k = ((q >> 3) & 1) + 2*((q >> 2) & 1) + 4*((q >> 1) & 1);
      er = 0; ei = 0;
      for (int t = 0; t < 8; t++) begin
        real c, s;
        c = $cos(2*PI*t*k/8); s = $sin(2*PI*t*k/8);
        er += xr[b*16 + 2*t + u]*c + xi[b*16 + 2*t + u]*s;
        ei += xi[b*16 + 2*t + u]*c - xr[b*16 + 2*t + u]*s;
      end
      checks++;
      if ((real'(out_re) - er)**2 + (real'(out_im) - ei)**2 > 144.0) begin
        failures++;
        $display("block %0d beat %0d: got (%0d,%0d) expected (%0.1f,%0.1f)", b, q, out_re, out_im, er, ei);
      end
      ocount++;
    end
  end

  initial begin
    rst_n = 1;     // a falling edge starts the asynchronous reset
    #1 rst_n = 0;
    for (int i = 0; i < NB*16; i++) begin
      xr[i] = int'($urandom_range(1000)) - 500;
      xi[i] = int'($urandom_range(1000)) - 500;
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < NB*16; i++) begin
      in_start <= (i == 0);
      in_valid <= 1;
      in_re <= W'(xr[i]); in_im <= W'(xi[i]);
      @(posedge clk);
    end
    in_valid <= 0; in_start <= 0;
    repeat (30) @(posedge clk);
    checks += 2;
    if (ocount != NB*16) begin failures++; $display("%0d outputs", ocount); end
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
