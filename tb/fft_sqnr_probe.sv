// fft_sqnr_probe -- runs NF random frames (uniform, amplitude AMP times full
// scale on both components) through an fft128 core of input width W (twiddle
// width W as well) and measures the SQNR of the results against a
// double-precision DFT scaled by 1/8, over all frames together. MODE selects
// the multiplier kind of the core (0 self-compensation, 1 direct truncation,
// 2 complete product rounded).
module fft_sqnr_probe #(
  parameter int  W   = 10,
  parameter int  NF  = 4,
  parameter real AMP = 0.5,
  parameter int  MODE = 0
) (
  output logic done,
  output real  sqnr_db,
  output int   bad_index
);
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, in_start = 0, in_valid = 0;
  logic signed [W-1:0] in_re [4], in_im [4];
  logic out_start, out_valid;
  logic signed [W+3:0] out_re [4], out_im [4];
  logic [6:0] out_idx [4];
  int xr [NF][128], xi [NF][128], yr [NF][128], yi [NF][128], seen [NF][128];
  int fo = 0, bo = 0;

  fft128 #(.W(W), .TW_W(W), .MUL_MODE(MODE)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk)
    if (out_valid && fo < NF) begin
      for (int l = 0; l < 4; l++) begin
        yr[fo][out_idx[l]] = int'(out_re[l]);
        yi[fo][out_idx[l]] = int'(out_im[l]);
        seen[fo][out_idx[l]]++;
      end
      bo++;
      if (bo == 32) begin bo = 0; fo++; end
    end

  initial begin
    real ps, pe;
    int  span;
    done = 0; bad_index = 0;
    rst_n = 1;
    #1 rst_n = 0;
    span = int'(AMP * real'(2**(W-1)));
    for (int f = 0; f < NF; f++)
      for (int n = 0; n < 128; n++) begin
        xr[f][n] = int'($urandom_range(2*span)) - span;
        xi[f][n] = int'($urandom_range(2*span)) - span;
        seen[f][n] = 0;
      end
    for (int l = 0; l < 4; l++) begin in_re[l] = '0; in_im[l] = '0; end
    repeat (3) @(posedge clk);
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
    wait (fo == NF);
    ps = 0; pe = 0;
    for (int f = 0; f < NF; f++)
      for (int k = 0; k < 128; k++) begin
        real rr, ri;
        if (seen[f][k] != 1) bad_index++;
        rr = 0; ri = 0;
        for (int n = 0; n < 128; n++) begin
          rr += xr[f][n]*$cos(2*PI*k*n/128) + xi[f][n]*$sin(2*PI*k*n/128);
          ri += xi[f][n]*$cos(2*PI*k*n/128) - xr[f][n]*$sin(2*PI*k*n/128);
        end
        rr /= 8.0; ri /= 8.0;
        ps += rr*rr + ri*ri;
        pe += (yr[f][k]-rr)**2 + (yi[f][k]-ri)**2;
      end
    sqnr_db = 10.0 * $log10(ps / pe);
    done = 1;
  end
endmodule
