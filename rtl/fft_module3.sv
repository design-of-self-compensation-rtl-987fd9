// fft_module3 -- third FFT stage: the second radix-8 step of the 64-point
// transforms, across the four data paths, without any general multiplier.
//
// After fft_module2 the eight samples of one radix-8 group (a4 = 0..7, fixed
// k1 and k) arrive in two consecutive beats q (a4 = l) and q+1 (a4 = l+4) on
// the four lanes. With a4 = 4*a1 + 2*a2 + a3 (a1 = beat parity, a2 = lane bit 1,
// a3 = lane bit 0):
//   step 1 over a1: a radix-2 butterfly with a one-register delay line per lane,
//          then lanes 2 and 3 times (-j)^b1 (b1 = parity of the step-1 output)
//   step 2 over a2: butterflies between lanes 0/2 and 1/3; the b2 = 1 results
//          move to lanes 2/3, then lanes 1 and 3 times W8^(b1 + 2*b2)
//   step 3 over a3: butterflies between lanes 0/1 and 2/3, result b3 on lane
//          bit 0.
// Output lane L = 2*b2 + b3, beat parity b1, so lane L of output beat q (32 per
// frame, q counted from out_start) holds X(2*(k + 8*b4) + k1) with
// k1 = q[4], k = q[3] + 2*q[2] + 4*q[1], b4 = q[0] + 2*L[1] + 4*L[0].
// Output width W+3, registered; latency 3 cycles.
module fft_module3
  import scfw_pkg::*;
#(
  parameter int W = 11
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_start,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_re [LANES],
  input  logic signed [W-1:0] in_im [LANES],
  output logic                out_start,
  output logic                out_valid,
  output logic signed [W+2:0] out_re [LANES],
  output logic signed [W+2:0] out_im [LANES]
);
  logic              s_start [LANES], s_valid [LANES];
  logic signed [W:0] s_re [LANES], s_im [LANES];   // step-1 outputs
  logic signed [W:0] r_re [LANES], r_im [LANES];   // after (-j)^b1
  logic              b1_q, b1;

  for (genvar l = 0; l < LANES; l++) begin : g_step1
    sdf_bu2_stage #(.W(W), .D(1)) u_s1 (
      .clk, .rst_n, .in_start, .in_valid, .in_re(in_re[l]), .in_im(in_im[l]),
      .out_start(s_start[l]), .out_valid(s_valid[l]), .out_re(s_re[l]), .out_im(s_im[l]));
    w8_rotator #(.W(W+1)) u_rj (
      .e((l >= 2 && b1) ? 2'd2 : 2'd0), .in_re(s_re[l]), .in_im(s_im[l]),
      .out_re(r_re[l]), .out_im(r_im[l]));
  end

  assign b1 = s_start[0] ? 1'b0 : b1_q;

  // Step 2: lanes (0,2) and (1,3).
  logic signed [W+1:0] t_re [LANES], t_im [LANES];
  logic signed [W+1:0] u_re [LANES], u_im [LANES];
  always_comb begin
    for (int l = 0; l < 2; l++) begin
      t_re[l]   = (W+2)'(r_re[l]) + (W+2)'(r_re[l+2]);
      t_im[l]   = (W+2)'(r_im[l]) + (W+2)'(r_im[l+2]);
      t_re[l+2] = (W+2)'(r_re[l]) - (W+2)'(r_re[l+2]);
      t_im[l+2] = (W+2)'(r_im[l]) - (W+2)'(r_im[l+2]);
    end
  end

  // W8^(b1 + 2*b2) on lanes with a3 = 1 (lanes 1 and 3).
  assign u_re[0] = t_re[0];
  assign u_im[0] = t_im[0];
  assign u_re[2] = t_re[2];
  assign u_im[2] = t_im[2];
  w8_rotator #(.W(W+2)) u_r1 (.e({1'b0, b1}), .in_re(t_re[1]), .in_im(t_im[1]), .out_re(u_re[1]), .out_im(u_im[1]));
  w8_rotator #(.W(W+2)) u_r3 (.e({1'b1, b1}), .in_re(t_re[3]), .in_im(t_im[3]), .out_re(u_re[3]), .out_im(u_im[3]));

  // Step 3: lanes (0,1) and (2,3), registered.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b1_q      <= 1'b0;
      out_start <= 1'b0;
      out_valid <= 1'b0;
      for (int l = 0; l < LANES; l++) begin
        out_re[l] <= '0;
        out_im[l] <= '0;
      end
    end else begin
      b1_q      <= ~b1;
      out_start <= s_start[0];
      out_valid <= s_valid[0];
      for (int h = 0; h < 2; h++) begin
        out_re[2*h]   <= (W+3)'(u_re[2*h]) + (W+3)'(u_re[2*h+1]);
        out_im[2*h]   <= (W+3)'(u_im[2*h]) + (W+3)'(u_im[2*h+1]);
        out_re[2*h+1] <= (W+3)'(u_re[2*h]) - (W+3)'(u_re[2*h+1]);
        out_im[2*h+1] <= (W+3)'(u_im[2*h]) - (W+3)'(u_im[2*h+1]);
      end
    end
  end

endmodule
