// bu8 -- radix-8 butterfly (BU_8) for one data path, built as three radix-2
// delay-feedback steps with 8, 4 and 2 storage registers.
//
// The lane carries IL interleaved 8-point transforms (IL = 2 in the FFT: the
// lane holds every fourth sample, i.e. two radix-8 groups of stride 8), so a
// block is 8*IL beats and sample t of group u arrives at beat IL*t + u. With
// t = 4*a1 + 2*a2 + a3 the steps pair samples 4*IL, 2*IL and IL beats apart:
//   step 1 over a1, then times (-j)^(a2*b1)
//   step 2 over a2, then times W8^(a3*(b1 + 2*b2))
//   step 3 over a3
// and the result for output index k of group u leaves at block beat
// 4*IL*b1 + 2*IL*b2 + IL*b3 + u,
// where k = b1 + 2*b2 + 4*b3 is the DFT output index (bit-reversed order).
// The trivial twiddles use w8_rotator (no multipliers). Each step adds one bit
// of growth: output is W+3 bits. Latency from a block's first input to its first
// output is 7*IL + 3 cycles; out_start and out_valid mark the output beats.
module bu8 #(
  parameter int W  = 11,
  parameter int IL = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_start,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_re, in_im,
  output logic                out_start,
  output logic                out_valid,
  output logic signed [W+2:0] out_re, out_im
);
  localparam int BW = $clog2(8*IL);     // block position width
  localparam int IB = $clog2(IL);       // position bit of t's LSB

  logic s1_start, s1_valid, s2_start, s2_valid;
  logic signed [W:0]   s1_re, s1_im, r1_re, r1_im;
  logic signed [W+1:0] s2_re, s2_im, r2_re, r2_im;
  logic [BW-1:0] p1_q, p1, p2_q, p2;
  logic [1:0] e1, e2;

  sdf_bu2_stage #(.W(W), .D(4*IL)) u_s1 (
    .clk, .rst_n, .in_start, .in_valid, .in_re, .in_im,
    .out_start(s1_start), .out_valid(s1_valid), .out_re(s1_re), .out_im(s1_im));

  // Position of the step-1 output within its block: 4IL*b1 + 2IL*a2 + IL*a3 + u.
  assign p1 = s1_start ? '0 : p1_q;
  assign e1 = (p1[IB+2] & p1[IB+1]) ? 2'd2 : 2'd0;

  w8_rotator #(.W(W+1)) u_r1 (.e(e1), .in_re(s1_re), .in_im(s1_im), .out_re(r1_re), .out_im(r1_im));

  sdf_bu2_stage #(.W(W+1), .D(2*IL)) u_s2 (
    .clk, .rst_n, .in_start(s1_start), .in_valid(s1_valid), .in_re(r1_re), .in_im(r1_im),
    .out_start(s2_start), .out_valid(s2_valid), .out_re(s2_re), .out_im(s2_im));

  // Position of the step-2 output: 4IL*b1 + 2IL*b2 + IL*a3 + u.
  assign p2 = s2_start ? '0 : p2_q;
  assign e2 = p2[IB] ? 2'(p2[IB+2] + 2*p2[IB+1]) : 2'd0;

  w8_rotator #(.W(W+2)) u_r2 (.e(e2), .in_re(s2_re), .in_im(s2_im), .out_re(r2_re), .out_im(r2_im));

  sdf_bu2_stage #(.W(W+2), .D(IL)) u_s3 (
    .clk, .rst_n, .in_start(s2_start), .in_valid(s2_valid), .in_re(r2_re), .in_im(r2_im),
    .out_start, .out_valid, .out_re, .out_im);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p1_q <= '0;
      p2_q <= '0;
    end else begin
      p1_q <= p1 + 1'b1;
      p2_q <= p2 + 1'b1;
    end
  end

endmodule
