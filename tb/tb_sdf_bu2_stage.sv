// tb_sdf_bu2_stage -- a D = 4 delay-feedback butterfly fed with six 8-beat
// blocks of random samples back to back. For each block, output beat j < 4
// must be x[j] + x[j+4] and beat j >= 4 must be x[j-4] - x[j], the first of
// them D+1 = 5 cycles after in_start (checked through out_start/out_valid).
module tb_sdf_bu2_stage;
  localparam int W = 8, D = 4, NB = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_start = 0, in_valid = 0;
  logic signed [W-1:0] in_re = '0, in_im = '0;
  logic out_start, out_valid;
  logic signed [W:0] out_re, out_im;
  int xr [NB*2*D], xi [NB*2*D];
  int ocount = 0, t_in = -1, t_out = -1, cyc = 0;

  sdf_bu2_stage #(.W(W), .D(D)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    if (in_start && t_in < 0) t_in = cyc;
    if (out_valid && ocount < NB*2*D) begin
      int b, j, er, ei;
      if (ocount == 0) begin
        t_out = cyc;
        checks++;
        if (!out_start) begin failures++; $display("out_start missing"); end
      end
      b = ocount / (2*D); j = ocount % (2*D);
      if (j < D) begin er = xr[b*2*D+j] + xr[b*2*D+j+D]; ei = xi[b*2*D+j] + xi[b*2*D+j+D]; end
      else       begin er = xr[b*2*D+j-D] - xr[b*2*D+j]; ei = xi[b*2*D+j-D] - xi[b*2*D+j]; end
      checks++;
      if (int'(out_re) != er || int'(out_im) != ei) begin
        failures++;
        $display("block %0d beat %0d: got (%0d,%0d) expected (%0d,%0d)", b, j, out_re, out_im, er, ei);
      end
      ocount++;
    end
  end

  initial begin
    rst_n = 1;     // a falling edge starts the asynchronous reset
    #1 rst_n = 0;
    for (int i = 0; i < NB*2*D; i++) begin
      xr[i] = int'($urandom_range(255)) - 128;
      xi[i] = int'($urandom_range(255)) - 128;
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < NB*2*D; i++) begin
      in_start <= (i == 0);
      in_valid <= 1;
      in_re <= W'(xr[i]); in_im <= W'(xi[i]);
      @(posedge clk);
    end
    in_valid <= 0; in_start <= 0;
    repeat (2*D + 4) @(posedge clk);
    checks += 2;
    if (ocount != NB*2*D) begin failures++; $display("%0d outputs, expected %0d", ocount, NB*2*D); end
    if (t_out - t_in != D + 1) begin failures++; $display("latency %0d, expected %0d", t_out - t_in, D + 1); end
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
