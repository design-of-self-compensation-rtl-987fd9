// mult_checker -- drives one sc_fixed_width_mult instance of width N and checks
// every result against an independent arithmetic model of the same scheme:
// radix-4 Booth rows (d_i * a, one's complement for negative digits), only the
// rows' bits at columns >= N kept, plus the width-dependent carry estimate
// computed from the number of ones in column N-1. It also accumulates the mean
// absolute error against the exact product, for the proposed multiplier and
// for a directly truncated one (no compensation), and the variance of the
// proposed multiplier's error, all in units of the product LSB.
// EXHAUSTIVE=1 sweeps all 2^(2N) operand pairs, otherwise SAMPLES random ones.
// MODE selects the multiplier kind under test and its model: 0 the
// self-compensation multiplier, 1 direct truncation (kept row bits only),
// 2 the complete product rounded to N bits.
module mult_checker #(
  parameter int N          = 8,
  parameter bit EXHAUSTIVE = 1,
  parameter int SAMPLES    = 100000,
  parameter int MODE       = 0
) (
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures,
  output real  avg_err_prop,
  output real  avg_err_direct,
  output real  var_err_prop
);
  logic signed [N-1:0] a, b, p;

  sc_fixed_width_mult #(.N(N), .MODE(MODE)) dut (.a(a), .b(b), .p(p));

  function automatic longint expected(input longint av, input longint bv,
                                      output longint direct_hp);
    longint hp, row, beta, comp, bm1, b0, b1, d;
    hp = 0; beta = 0;
    for (int i = 0; i < N/2; i++) begin
      b1  = (bv >> (2*i+1)) & 1;
      b0  = (bv >> (2*i)) & 1;
      bm1 = (i == 0) ? 0 : ((bv >> (2*i-1)) & 1);
      d   = -2*b1 + b0 + bm1;
      row = (d < 0) ? d*av - 1 : d*av;            // one's complement row
      hp  += (row * (longint'(1) << (2*i))) >>> N; // floor of its kept part
      beta += (row >>> (N-1-2*i)) & 1;
    end
    direct_hp = hp;
    if (MODE == 1) return hp;
    if (MODE == 2) return (av * bv + (longint'(1) << (N-1))) >>> N;
    if (N == 8)       comp = beta/2 + 1;
    else if (N == 16) comp = beta/2 + 2;
    else              comp = (beta+1)/2 + 1;
    return hp + comp;
  endfunction

  initial begin
    longint total, ea, eb, exp_p, dir_hp, exact, got, e1, e2;
    real sum_p, sum_d, sq_p;
    done = 0; checks = 0; failures = 0; sum_p = 0; sum_d = 0; sq_p = 0;
    a = '0; b = '0;
    wait (start);
    total = EXHAUSTIVE ? (longint'(1) << (2*N)) : SAMPLES;
    for (longint k = 0; k < total; k++) begin
      if (EXHAUSTIVE) begin
        a = N'(k); b = N'(k >> N);
      end else begin
        a = N'($urandom); b = N'($urandom);
      end
      #1;
      ea = longint'(a); eb = longint'(b);
      exp_p = expected(ea, eb, dir_hp);
      got   = longint'(p);
      checks++;
      if (N'(got) !== N'(exp_p)) begin
        failures++;
        if (failures < 5)
          $display("N=%0d a=%0d b=%0d got=%0d expected=%0d", N, ea, eb, got, N'(exp_p));
      end
      exact = ea * eb;
      // Error against the exact product, kept part sign-extended like the
      // reference (wrap-around of the N-bit result removed).
      e1 = exact - (exp_p << N); if (e1 < 0) e1 = -e1;
      e2 = exact - (dir_hp << N); if (e2 < 0) e2 = -e2;
      sum_p += real'(e1); sum_d += real'(e2); sq_p += real'(e1) * real'(e1);
    end
    avg_err_prop   = sum_p / real'(total);
    avg_err_direct = sum_d / real'(total);
    var_err_prop   = sq_p / real'(total) - avg_err_prop * avg_err_prop;
    done = 1;
  end
endmodule
