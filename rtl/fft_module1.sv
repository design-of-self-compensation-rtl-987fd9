// fft_module1 -- first FFT stage: 64 radix-2 butterflies of the 128-point
// transform on four parallel data paths, with the W128 twiddle multiplication.
//
// A frame is 32 beats; beat m carries in(4m) .. in(4m+3) on lanes 0..3.
// Beats 0-15: the 64 first-half samples are written into the register file
// (16 rows x 4 lanes of complex words) while the row's previous contents, the
// differences of the previous frame, are sent out.
// Beats 16-31: each lane's butterfly adds and subtracts in(i) (from the
// register file) and in(64+i) (from the input). The four sums go out at once
// (k1 = 0 half); the four differences are written back (k1 = 1 half, sent out
// during beats 0-15 of the next frame). The differences need W128^i: lanes 0
// and 1 are multiplied before being stored, lanes 2 and 3 when read out, so
// the two complex multipliers and their two twiddle ROMs work on every beat.
//
// Output: 32 beats per frame, the 16 sum beats then the 16 difference beats,
// lane l of output beat m holding index n2 = 4m + l of its half; out_start marks
// the first beat. Outputs are registered: latency 17 cycles from in_start.
// The counter runs freely after reset and is re-aligned by in_start, so frames
// may follow each other without gaps. Output width is W+1 (one bit of growth).
module fft_module1
  import scfw_pkg::*;
#(
  parameter int W    = 10,     // input width
  parameter int TW_W = 10,     // twiddle width
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
  output logic signed [W:0]   out_re [LANES],
  output logic signed [W:0]   out_im [LANES]
);
  logic signed [W:0] rf_re [HALF_BEATS][LANES];
  logic signed [W:0] rf_im [HALF_BEATS][LANES];
  logic              rf_vld [HALF_BEATS];

  logic [4:0] cnt_q, cnt;
  logic [3:0] m;
  logic       half;

  assign cnt  = in_start ? '0 : cnt_q;
  assign m    = cnt[3:0];
  assign half = cnt[4];

  // Butterflies.
  logic signed [W:0] x_re [LANES], x_im [LANES];
  logic signed [W:0] sum_re [LANES], sum_im [LANES];
  logic signed [W:0] dif_re [LANES], dif_im [LANES];
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      x_re[l]   = (W+1)'(in_re[l]);
      x_im[l]   = (W+1)'(in_im[l]);
      sum_re[l] = rf_re[m][l] + x_re[l];
      sum_im[l] = rf_im[m][l] + x_im[l];
      dif_re[l] = rf_re[m][l] - x_re[l];
      dif_im[l] = rf_im[m][l] - x_im[l];
    end
  end

  // Two complex multipliers: lanes 0/1 on store (half 1), lanes 2/3 on read (half 0).
  logic [5:0]            ta0, ta1;
  logic signed [TW_W-1:0] w0r, w0i, w1r, w1i;
  logic signed [W:0]     m0a_re, m0a_im, m1a_re, m1a_im;
  logic signed [W:0]     m0p_re, m0p_im, m1p_re, m1p_im;

  assign ta0    = {m, half ? 2'd0 : 2'd2};
  assign ta1    = {m, half ? 2'd1 : 2'd3};
  assign m0a_re = half ? dif_re[0] : rf_re[m][2];
  assign m0a_im = half ? dif_im[0] : rf_im[m][2];
  assign m1a_re = half ? dif_re[1] : rf_re[m][3];
  assign m1a_im = half ? dif_im[1] : rf_im[m][3];

  twiddle_rom #(.P(FFT_POINTS), .DEPTH(64), .TW_W(TW_W)) u_rom0 (.addr(ta0), .re(w0r), .im(w0i));
  twiddle_rom #(.P(FFT_POINTS), .DEPTH(64), .TW_W(TW_W)) u_rom1 (.addr(ta1), .re(w1r), .im(w1i));

  complex_mult #(.DW(W+1), .TW_W(TW_W), .MODE(MUL_MODE)) u_cm0 (
    .ar(m0a_re), .ai(m0a_im), .wr(w0r), .wi(w0i), .pr(m0p_re), .pi(m0p_im));
  complex_mult #(.DW(W+1), .TW_W(TW_W), .MODE(MUL_MODE)) u_cm1 (
    .ar(m1a_re), .ai(m1a_im), .wr(w1r), .wi(w1i), .pr(m1p_re), .pi(m1p_im));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q     <= '0;
      out_start <= 1'b0;
      out_valid <= 1'b0;
      for (int r = 0; r < HALF_BEATS; r++) begin
        rf_vld[r] <= 1'b0;
        for (int l = 0; l < LANES; l++) begin
          rf_re[r][l] <= '0;
          rf_im[r][l] <= '0;
        end
      end
      for (int l = 0; l < LANES; l++) begin
        out_re[l] <= '0;
        out_im[l] <= '0;
      end
    end else begin
      cnt_q <= cnt + 1'b1;
      if (!half) begin
        // Store first half, send out the previous frame's differences.
        out_re[0] <= rf_re[m][0]; out_im[0] <= rf_im[m][0];
        out_re[1] <= rf_re[m][1]; out_im[1] <= rf_im[m][1];
        out_re[2] <= m0p_re;      out_im[2] <= m0p_im;
        out_re[3] <= m1p_re;      out_im[3] <= m1p_im;
        out_valid <= rf_vld[m];
        out_start <= 1'b0;
        rf_vld[m] <= in_valid;
        for (int l = 0; l < LANES; l++) begin
          rf_re[m][l] <= x_re[l];
          rf_im[m][l] <= x_im[l];
        end
      end else begin
        // Butterflies: sums out, differences stored (lanes 0/1 already rotated).
        for (int l = 0; l < LANES; l++) begin
          out_re[l] <= sum_re[l];
          out_im[l] <= sum_im[l];
        end
        out_valid <= in_valid && rf_vld[m];
        out_start <= in_valid && rf_vld[m] && (m == 4'd0);
        rf_vld[m] <= in_valid && rf_vld[m];
        rf_re[m][0] <= m0p_re; rf_im[m][0] <= m0p_im;
        rf_re[m][1] <= m1p_re; rf_im[m][1] <= m1p_im;
        rf_re[m][2] <= dif_re[2]; rf_im[m][2] <= dif_im[2];
        rf_re[m][3] <= dif_re[3]; rf_im[m][3] <= dif_im[3];
      end
    end
  end

endmodule
