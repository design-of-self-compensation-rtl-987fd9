// sdf_bu2_stage -- two-input butterfly unit with a D-deep feedback delay line
// (single-path delay feedback). It pairs stream samples D beats apart.
//
// Beats are counted from in_start in blocks of 2D. During the first D beats of
// a block the incoming samples enter the delay line while the differences left
// by the previous block leave it. During the second D beats each incoming
// sample meets its partner (D beats older) at the head of the line: the sum is
// sent out at once and the difference goes into the line, to leave during the
// first half of the next block. Outputs are one bit wider than inputs and are
// registered: a block's outputs start D+1 cycles after its first input
// (out_start, out_valid follow in_start, in_valid by the same D+1 cycles).
// The counter runs freely, so back-to-back blocks need no gaps and a block's
// differences are flushed while the next block (or idle beats) arrives.
module sdf_bu2_stage #(
  parameter int W = 11,   // input width; output is W+1
  parameter int D = 8     // pair distance (power of two)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_start,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_re, in_im,
  output logic                out_start,
  output logic                out_valid,
  output logic signed [W:0]   out_re, out_im
);
  localparam int CW = $clog2(2*D);

  logic signed [W:0] dl_re [D];
  logic signed [W:0] dl_im [D];
  logic [CW-1:0] cnt_q, cnt;
  logic          second;
  logic [D:0]    st_sr, vl_sr;
  logic signed [W:0] x_re, x_im;

  assign cnt    = in_start ? '0 : cnt_q;
  assign second = cnt[CW-1];
  assign x_re   = (W+1)'(in_re);
  assign x_im   = (W+1)'(in_im);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q  <= '0;
      out_re <= '0;
      out_im <= '0;
      st_sr  <= '0;
      vl_sr  <= '0;
      for (int k = 0; k < D; k++) begin
        dl_re[k] <= '0;
        dl_im[k] <= '0;
      end
    end else begin
      cnt_q <= cnt + 1'b1;
      st_sr <= {st_sr[D-1:0], in_start};
      vl_sr <= {vl_sr[D-1:0], in_valid};
      for (int k = D-1; k > 0; k--) begin
        dl_re[k] <= dl_re[k-1];
        dl_im[k] <= dl_im[k-1];
      end
      if (second) begin
        out_re   <= dl_re[D-1] + x_re;
        out_im   <= dl_im[D-1] + x_im;
        dl_re[0] <= dl_re[D-1] - x_re;
        dl_im[0] <= dl_im[D-1] - x_im;
      end else begin
        out_re   <= dl_re[D-1];
        out_im   <= dl_im[D-1];
        dl_re[0] <= x_re;
        dl_im[0] <= x_im;
      end
    end
  end

  assign out_start = st_sr[D];
  assign out_valid = vl_sr[D];

endmodule
