// carry_estimator -- error-compensation bias of the self-compensation
// fixed-width Booth multiplier.
//
// The n/2 partial-product bits of the most significant truncated column
// (LP_major) are summed with full and half adders, in stages: each stage groups
// the current sum signals in threes (a full adder each), a left-over pair goes
// to a half adder and a single left-over signal passes on. Every adder carry has
// the weight of the lowest kept product column, so the carries together are
// floor(beta/2) (beta = number of ones), or floor((beta+1)/2) when a constant 1
// joins the tree. Further carries tied to 1 add the constant of the equation.
// The multiplier adds all carry bits into its lowest kept column.
//
// The per-width equations (n = 8..16) follow the document; how the adders are
// grouped follows its stated procedure. Purely combinational.
//
// Ports: lp_major[N/2-1:0] in; carry[NC-1:0] out, each bit of weight one.
module carry_estimator
  import scfw_pkg::*;
#(
  parameter int N = 10
) (
  input  logic [N/2-1:0] lp_major,
  output logic [N/2+2:0] carry           // unused positions are 0
);
  localparam int ONES = ce_tree_ones(N);
  localparam int NB   = N/2 + ONES;      // inputs of the adder tree
  localparam int NCON = ce_const_carries(N);
  localparam int NC   = N/2 + 3;

  initial begin
    assert (ce_width_supported(N))
      else $error("carry_estimator: no carry-estimation equation for N=%0d", N);
  end

  always_comb begin
    logic [NB-1:0] cur, nxt;
    int cnt, ncnt, nc;
    cur = NB'(lp_major);
    if (ONES != 0) cur[NB-1] = 1'b1;
    cnt   = NB;
    nc    = 0;
    carry = '0;
    for (int s = 0; s < NB; s++) begin
      if (cnt > 1) begin
        nxt  = '0;
        ncnt = 0;
        for (int g = 0; g < NB; g += 3) begin
          if (g + 2 < cnt) begin                         // full adder
            nxt[ncnt] = cur[g] ^ cur[g+1] ^ cur[g+2];
            carry[nc] = (cur[g] & cur[g+1]) | (cur[g] & cur[g+2]) | (cur[g+1] & cur[g+2]);
            ncnt++; nc++;
          end else if (g + 1 < cnt) begin                // half adder
            nxt[ncnt] = cur[g] ^ cur[g+1];
            carry[nc] = cur[g] & cur[g+1];
            ncnt++; nc++;
          end else if (g < cnt) begin                    // passes to next stage
            nxt[ncnt] = cur[g];
            ncnt++;
          end
        end
        cur = nxt;
        cnt = ncnt;
      end
    end
    for (int k = 0; k < NCON; k++) carry[NC-1-k] = 1'b1;
  end

endmodule
