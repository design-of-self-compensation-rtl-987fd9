// fft128 -- 128-point FFT core with four parallel data paths, mixed radix
// 2 x 8 x 8, using self-compensation fixed-width multipliers for every
// non-trivial twiddle factor.
//
//   fft_module1: radix-2 step (in(i) with in(64+i)), times W128^(n2*k1)
//   fft_module2: first radix-8 step of the two 64-point halves, times
//                W64^(a4*k); its outputs drop three LSBs
//   fft_module3: second radix-8 step, trivial twiddles only
//
// Input: a frame of 32 beats, beat m holding in(4m+l) on lane l, in_start on
// beat 0 and in_valid on all 32 beats; frames may follow back to back. Output:
// 32 beats per frame, four results per beat; out_idx gives the frequency index
// of each lane's result (the order is the digit reversal of the input order).
// Widths: input W (10), after module 1 W+1, module 2 keeps W+1, output W+4
// (14 for W = 10). Latency from in_start to out_start: 17 + 18 + 3 = 38 cycles.
module fft128
  import scfw_pkg::*;
#(
  parameter int W    = 10,
  parameter int TW_W = 10,
  parameter int MUL_MODE = MUL_SC  // multiplier kind (MUL_SC; the others only for comparison)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_start,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_re [LANES],
  input  logic signed [W-1:0] in_im [LANES],
  output logic                out_start,
  output logic                out_valid,
  output logic signed [W+3:0] out_re [LANES],
  output logic signed [W+3:0] out_im [LANES],
  output logic [6:0]          out_idx [LANES]
);
  logic              m1_start, m1_valid, m2_start, m2_valid;
  logic signed [W:0] m1_re [LANES], m1_im [LANES];
  logic signed [W:0] m2_re [LANES], m2_im [LANES];

  fft_module1 #(.W(W), .TW_W(TW_W), .MUL_MODE(MUL_MODE)) u_m1 (
    .clk, .rst_n, .in_start, .in_valid, .in_re, .in_im,
    .out_start(m1_start), .out_valid(m1_valid), .out_re(m1_re), .out_im(m1_im));

  fft_module2 #(.W(W+1), .TW_W(TW_W), .MUL_MODE(MUL_MODE)) u_m2 (
    .clk, .rst_n, .in_start(m1_start), .in_valid(m1_valid), .in_re(m1_re), .in_im(m1_im),
    .out_start(m2_start), .out_valid(m2_valid), .out_re(m2_re), .out_im(m2_im));

  fft_module3 #(.W(W+1)) u_m3 (
    .clk, .rst_n, .in_start(m2_start), .in_valid(m2_valid), .in_re(m2_re), .in_im(m2_im),
    .out_start, .out_valid, .out_re, .out_im);

  // Frequency index of each output lane.
  logic [4:0] q_q, q;
  assign q = out_start ? '0 : q_q;
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      logic [2:0] k, b4;
      k  = {q[1], q[2], q[3]};
      b4 = {l[0], l[1], q[0]};
      out_idx[l] = {b4, k, q[4]};      // 2*(k + 8*b4) + k1
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q_q <= '0;
    else        q_q <= q + 1'b1;
  end

endmodule
