// sc_fixed_width_mult -- n x n self-compensation fixed-width Booth multiplier.
//
// Multiplies two signed N-bit operands and returns only the N most significant
// bits of the 2N-bit product (p[2N-1:N]). The multiplier operand b is recoded
// into N/2 radix-4 Booth digits; digit i selects 0, +-a or +-2a as an (N+1)-bit
// partial-product row, negated rows being one's complements with a separate
// correction bit n_i in the row's lowest column. None of the adders of the N low
// columns (LP) are built: the rows contribute only their bits in the kept
// columns (HP), sign-extended. The carry the LP would have passed into the HP is
// replaced by the carry estimator, which looks only at the LP_major column
// (column N-1, one bit from each row) and adds floor(beta/2)+const or
// floor((beta+1)/2)+const, per the width-dependent equation.
//
// The document's structure (Booth rows, truncated LP, LP_major carry estimate,
// kept HP summed by adders and a final carry-propagate adder) is followed; the
// HP array is written here as a word-level sum of the truncated rows and left to
// synthesis rather than as an explicit full-adder netlist.
//
// MODE selects the multiplier kind (default MUL_SC, the design itself). The
// two reference kinds are used only to measure the design against:
// MUL_TRUNC drops the LP columns without any compensation (direct
// truncation), and MUL_FULL forms the complete 2N-bit product and rounds it
// to the upper N bits (a full-width multiplier). The document compares
// against these two; its full-width multiplier's rounding is not stated, so
// rounding to nearest is this design's choice.
//
// Ports: a (multiplicand), b (Booth-recoded multiplier), p (N-bit product, in
// units of 2^N of the full product). Combinational, no clock.
module sc_fixed_width_mult
  import scfw_pkg::*;
#(
  parameter int N    = 10,
  parameter int MODE = MUL_SC
) (
  input  logic signed [N-1:0] a,
  input  logic signed [N-1:0] b,
  output logic signed [N-1:0] p
);
  localparam int ROWS = N / 2;

  logic [N:0]      pp [ROWS];          // partial-product rows, bits P_i_0 .. P_i_N
  logic [ROWS-1:0] lp_major;           // column N-1 of the rows
  logic [N/2+2:0]  carry;

  // Booth recoding and partial-product selection (one row per digit).
  always_comb begin
    logic [N+1:0] bx;                  // b with the implicit b[-1] = 0
    logic [2:0]   trip;
    logic [N:0]   mag;
    bx = {b[N-1], b, 1'b0};
    for (int i = 0; i < ROWS; i++) begin
      trip = bx[2*i +: 3];             // {b[2i+1], b[2i], b[2i-1]}
      unique case (trip)
        3'b001, 3'b010: mag = {a[N-1], a};          // +a
        3'b011:         mag = {a, 1'b0};            // +2a
        3'b100:         mag = ~{a, 1'b0};           // -2a (plus n_i)
        3'b101, 3'b110: mag = ~{a[N-1], a};         // -a  (plus n_i)
        default:        mag = '0;                   // 0
      endcase
      pp[i]       = mag;
      lp_major[i] = mag[N-1-2*i];
    end
  end

  carry_estimator #(.N(N)) u_ce (.lp_major(lp_major), .carry(carry));

  // Kept high part: each row contributes its bits of columns N .. 2N-1.
  always_comb begin
    logic [N-1:0] acc;
    logic signed [2*N-1:0] full;
    acc = '0;
    for (int i = 0; i < ROWS; i++)
      acc = acc + N'(((2*N)'(signed'(pp[i])) << (2*i)) >> N);
    if (MODE == MUL_SC)
      for (int k = 0; k < N/2 + 3; k++) acc = acc + N'(carry[k]);
    full = (2*N)'(a) * (2*N)'(b) + (2*N)'(2**(N-1));
    p = (MODE == MUL_FULL) ? N'(full >>> N) : signed'(acc);
  end

endmodule
