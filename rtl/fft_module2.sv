// fft_module2 -- second FFT stage: the first radix-8 step of the 64-point
// transforms, one BU_8 per data path, followed by the W64 twiddle
// multiplication with one complex multiplier per data path.
//
// Input: the 32-beat stream of fft_module1 (16 beats per 64-point half), lane l
// of beat m holding n2 = 4m + l. Lane l thus carries the two radix-8 groups
// a4 = l and a4 = l + 4 interleaved (group u = m mod 2, group sample t = m/2),
// exactly what a BU_8 with IL = 2 expects. Each BU_8 result (W+3 bits) loses
// its three least significant bits and is multiplied by W64^(a4*k), k being
// the radix-8 output index; within a 16-beat block output beat q holds
// k = q[3] + 2*q[2] + 4*q[1] of group u = q[0].
// Output width W (input width), registered; latency 7*2+3+1 = 18 cycles.
module fft_module2
  import scfw_pkg::*;
#(
  parameter int W    = 11,
  parameter int TW_W = 10,
  parameter int MUL_MODE = MUL_SC  // multiplier kind of the complex multipliers
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_start,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_re [LANES],
  input  logic signed [W-1:0] in_im [LANES],
  output logic                out_start,
  output logic                out_valid,
  output logic signed [W-1:0] out_re [LANES],
  output logic signed [W-1:0] out_im [LANES]
);
  logic                b_start [LANES], b_valid [LANES];
  logic signed [W+2:0] b_re [LANES], b_im [LANES];
  logic [3:0]          q_q, q;
  logic [2:0]          k;

  assign q = b_start[0] ? '0 : q_q;
  assign k = {q[1], q[2], q[3]};

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic [2:0]             a4;
    logic [5:0]             ta;
    logic signed [TW_W-1:0] wr, wi;
    logic signed [W-1:0]    pr, pi;

    bu8 #(.W(W), .IL(2)) u_bu8 (
      .clk, .rst_n, .in_start, .in_valid, .in_re(in_re[l]), .in_im(in_im[l]),
      .out_start(b_start[l]), .out_valid(b_valid[l]), .out_re(b_re[l]), .out_im(b_im[l]));

    assign a4 = {q[0], 2'(l)};
    assign ta = 6'(a4 * k);

    twiddle_rom #(.P(64), .DEPTH(64), .TW_W(TW_W)) u_rom (.addr(ta), .re(wr), .im(wi));

    complex_mult #(.DW(W), .TW_W(TW_W), .MODE(MUL_MODE)) u_cm (
      .ar(b_re[l][W+2:3]), .ai(b_im[l][W+2:3]), .wr, .wi, .pr, .pi);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        out_re[l] <= '0;
        out_im[l] <= '0;
      end else begin
        out_re[l] <= pr;
        out_im[l] <= pi;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_q       <= '0;
      out_start <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      q_q       <= q + 1'b1;
      out_start <= b_start[0];
      out_valid <= b_valid[0];
    end
  end

endmodule
