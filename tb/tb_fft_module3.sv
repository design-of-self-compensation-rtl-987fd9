// tb_fft_module3 -- three 32-beat frames of random samples through the last
// radix-8 stage. Input beats 2g and 2g+1 carry group g (a4 = l and l + 4 on
// lane l). Output beat 2g + b1, lane L = 2*b2 + b3 must hold bin
// b4 = b1 + 2*b2 + 4*b3 of the 8-point DFT of the group over a4, within 12 LSB
// (shift-and-add W8 rotations). The first output appears 3 cycles after
// in_start.
module tb_fft_module3;
  localparam int W = 11, NF = 3;
  localparam real PI = 3.14159265358979323846;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_start = 0, in_valid = 0;
  logic signed [W-1:0] in_re [4], in_im [4];
  logic signed [W+2:0] out_re [4], out_im [4];
  logic out_start, out_valid;
  int vr [NF*16][8], vi [NF*16][8];
  int ocount = 0, t_in = -1, t_out = -1, cyc = 0;

  fft_module3 #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    if (in_start && t_in < 0) t_in = cyc;
    if (out_valid && ocount < NF*32) begin
      int g, b1;
      if (ocount == 0) t_out = cyc;
      g = ocount / 2; b1 = ocount % 2;
      for (int L = 0; L < 4; L++) begin
        int b4;
        real er, ei, c, s;
        b4 = b1 + 2*(L / 2) + 4*(L % 2);
        er = 0; ei = 0;
        for (int a = 0; a < 8; a++) begin
          c = $cos(2*PI*a*b4/8); s = $sin(2*PI*a*b4/8);
          er += vr[g][a]*c + vi[g][a]*s;
          ei += vi[g][a]*c - vr[g][a]*s;
        end
        checks++;
        if ((real'(out_re[L]) - er)**2 + (real'(out_im[L]) - ei)**2 > 144.0) begin
          failures++;
          $display("group %0d bin %0d: got (%0d,%0d) expected (%0.1f,%0.1f)", g, b4, out_re[L], out_im[L], er, ei);
        end
      end
      ocount++;
    end
  end

  initial begin
    rst_n = 1;     // a falling edge starts the asynchronous reset
    #1 rst_n = 0;
    for (int g = 0; g < NF*16; g++)
      for (int a = 0; a < 8; a++) begin
        vr[g][a] = int'($urandom_range(1600)) - 800;
        vi[g][a] = int'($urandom_range(1600)) - 800;
      end
    for (int l = 0; l < 4; l++) begin in_re[l] = '0; in_im[l] = '0; end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int q = 0; q < NF*32; q++) begin
      in_start <= (q % 32 == 0);
      in_valid <= 1;
      for (int l = 0; l < 4; l++) begin
        in_re[l] <= W'(vr[q/2][l + 4*(q%2)]);
        in_im[l] <= W'(vi[q/2][l + 4*(q%2)]);
      end
      @(posedge clk);
    end
    in_valid <= 0; in_start <= 0;
    repeat (10) @(posedge clk);
    checks += 2;
    if (ocount != NF*32) begin failures++; $display("%0d output beats", ocount); end
    if (t_out - t_in != 3) begin failures++; $display("latency %0d, expected 3", t_out - t_in); end
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
