// w8_rotator -- multiplies a complex sample by one of the trivial twiddle
// factors W8^e (e = 0: 1, e = 1: (1-j)/sqrt2, e = 2: -j, e = 3: -(1+j)/sqrt2)
// without a multiplier. -j swaps the real and imaginary parts and negates one;
// sqrt2/2 is approximated by 2^-1 + 2^-3 + 2^-4 + 2^-6 + 2^-8 = 0.70703125, i.e.
// five arithmetic shifts and four additions. Results are saturated to W bits.
// Combinational.
module w8_rotator #(
  parameter int W = 12
) (
  input  logic [1:0]          e,
  input  logic signed [W-1:0] in_re, in_im,
  output logic signed [W-1:0] out_re, out_im
);
  function automatic logic signed [W+1:0] c707(input logic signed [W+1:0] x);
    return (x >>> 1) + (x >>> 3) + (x >>> 4) + (x >>> 6) + (x >>> 8);
  endfunction

  function automatic logic signed [W-1:0] sat(input logic signed [W+1:0] v);
    if (v > (W+2)'(2**(W-1) - 1)) return {1'b0, {(W-1){1'b1}}};
    if (v < -(W+2)'(2**(W-1)))    return {1'b1, {(W-1){1'b0}}};
    return v[W-1:0];
  endfunction

  logic signed [W+1:0] r, i;
  assign r = (W+2)'(in_re);
  assign i = (W+2)'(in_im);

  always_comb begin
    unique case (e)
      2'd0: begin out_re = in_re;          out_im = in_im;           end
      2'd1: begin out_re = sat(c707(r + i));  out_im = sat(c707(i - r));  end
      2'd2: begin out_re = in_im;          out_im = sat(-r);         end
      default: begin out_re = sat(c707(i - r)); out_im = sat(c707(-r - i)); end
    endcase
  end

endmodule
