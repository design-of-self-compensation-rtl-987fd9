// scfw_pkg -- constants and helper functions shared by the self-compensation
// fixed-width multiplier and the 128-point FFT built on it.
//
// The carry-estimation equations depend on the operand width n:
//   n = 8           : Carry = floor(beta/2) + 1
//   n = 10, 12, 14  : Carry = floor((beta+1)/2) + 1
//   n = 16          : Carry = floor(beta/2) + 2
// where beta is the number of ones in the most significant truncated column
// (LP_major). The "+1" inside the floor is realised as a constant 1 fed into the
// adder tree, the constant outside the floor as carry bits tied to 1.
package scfw_pkg;

  // Constant ones fed into the LP_major adder tree (the +1 inside the floor).
  function automatic int ce_tree_ones(input int n);
    return (n == 10 || n == 12 || n == 14) ? 1 : 0;
  endfunction

  // Constant carries added to the kept part (the term outside the floor).
  function automatic int ce_const_carries(input int n);
    return (n == 16) ? 2 : 1;
  endfunction

  // Widths for which the document gives a carry-estimation equation.
  function automatic bit ce_width_supported(input int n);
    return (n >= 8) && (n <= 16) && (n % 2 == 0);
  endfunction

  // Multiplier kinds (the MODE parameter of sc_fixed_width_mult). Only
  // MUL_SC is the self-compensation multiplier; the other two are the
  // references it is measured against.
  localparam int MUL_SC    = 0;   // LP dropped, carry estimated from LP_major
  localparam int MUL_TRUNC = 1;   // LP dropped, no compensation (direct truncation)
  localparam int MUL_FULL  = 2;   // complete product, rounded to the upper N bits

  // FFT organisation.
  localparam int FFT_POINTS = 128;
  localparam int LANES      = 4;            // parallel data paths
  localparam int FRAME_BEATS = FFT_POINTS / LANES;  // 32 cycles per frame
  localparam int HALF_BEATS  = FRAME_BEATS / 2;     // 16

endpackage
