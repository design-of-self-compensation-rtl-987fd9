// twiddle_rom -- read-only table of twiddle factors W_P^e = exp(-j*2*pi*e/P).
//
// Entry e holds cos(2*pi*e/P) and -sin(2*pi*e/P) as signed TW_W-bit fractions
// with TW_W-1 fraction bits, rounded to nearest; +1.0 saturates to the largest
// code. The table is computed at elaboration, so it needs no data file.
// Combinational read: addr in, re/im out in the same cycle.
module twiddle_rom #(
  parameter int P     = 128,   // transform size the factors belong to
  parameter int DEPTH = 64,    // number of exponents stored, e = 0 .. DEPTH-1
  parameter int TW_W  = 10     // twiddle word width
) (
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic signed [TW_W-1:0]   re,
  output logic signed [TW_W-1:0]   im
);
  typedef logic signed [TW_W-1:0] tw_t;
  typedef tw_t tbl_t [DEPTH];

  function automatic tw_t quant(input real v);
    real s;
    longint q;
    s = v * real'(longint'(1) << (TW_W-1));
    q = longint'($floor(s + 0.5));
    if (q > (longint'(1) << (TW_W-1)) - 1) q = (longint'(1) << (TW_W-1)) - 1;
    if (q < -(longint'(1) << (TW_W-1)))    q = -(longint'(1) << (TW_W-1));
    return tw_t'(q);
  endfunction

  function automatic tbl_t make_tbl(input bit imag);
    tbl_t t;
    real pi = 3.14159265358979323846;
    for (int e = 0; e < DEPTH; e++)
      t[e] = imag ? quant(-$sin(2.0*pi*real'(e)/real'(P)))
                  : quant( $cos(2.0*pi*real'(e)/real'(P)));
    return t;
  endfunction

  localparam tbl_t TBL_RE = make_tbl(1'b0);
  localparam tbl_t TBL_IM = make_tbl(1'b1);

  assign re = TBL_RE[addr];
  assign im = TBL_IM[addr];

endmodule
