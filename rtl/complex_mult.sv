// complex_mult -- multiplies a complex sample by a complex twiddle factor with
// four self-compensation fixed-width multipliers and two adders.
//
//   re = ar*wr - ai*wi,  im = ar*wi + ai*wr
//
// The fixed-width multiplier is square (MW x MW -> MW most significant bits).
// MW is one bit wider than the data so that, with the data placed one bit up
// ({a, 0}) and the twiddle left-aligned as a fraction with MW-1 fraction bits,
// the kept half of each product is a*w in the data's own scale. The twiddle
// keeps its TW_W-bit precision (its low MW-TW_W bits are zero). Results are
// saturated to DW bits (|a*w| <= |a| for a unit twiddle, so only the rare
// corner where both components are near full scale can saturate).
// Combinational; no clock.
module complex_mult #(
  parameter int DW   = 11,   // data width
  parameter int TW_W = 10,   // twiddle width, TW_W-1 fraction bits
  parameter int MODE = 0     // multiplier kind, see scfw_pkg (0: self-compensation)
) (
  input  logic signed [DW-1:0]   ar, ai,
  input  logic signed [TW_W-1:0] wr, wi,
  output logic signed [DW-1:0]   pr, pi
);
  localparam int MW = DW + 1;

  initial begin
    assert (MW >= TW_W) else $error("complex_mult: twiddle wider than multiplier");
  end

  logic signed [MW-1:0] a_r, a_i, w_r, w_i;
  logic signed [MW-1:0] p_rr, p_ii, p_ri, p_ir;

  assign a_r = {ar, 1'b0};
  assign a_i = {ai, 1'b0};
  assign w_r = {wr, {(MW-TW_W){1'b0}}};
  assign w_i = {wi, {(MW-TW_W){1'b0}}};

  sc_fixed_width_mult #(.N(MW), .MODE(MODE)) u_rr (.a(a_r), .b(w_r), .p(p_rr));
  sc_fixed_width_mult #(.N(MW), .MODE(MODE)) u_ii (.a(a_i), .b(w_i), .p(p_ii));
  sc_fixed_width_mult #(.N(MW), .MODE(MODE)) u_ri (.a(a_r), .b(w_i), .p(p_ri));
  sc_fixed_width_mult #(.N(MW), .MODE(MODE)) u_ir (.a(a_i), .b(w_r), .p(p_ir));

  function automatic logic signed [DW-1:0] sat(input logic signed [MW:0] v);
    if (v > (MW+1)'(2**(DW-1) - 1))   return {1'b0, {(DW-1){1'b1}}};
    if (v < -(MW+1)'(2**(DW-1)))      return {1'b1, {(DW-1){1'b0}}};
    return v[DW-1:0];
  endfunction

  assign pr = sat((MW+1)'(p_rr) - (MW+1)'(p_ii));
  assign pi = sat((MW+1)'(p_ri) + (MW+1)'(p_ir));

endmodule
