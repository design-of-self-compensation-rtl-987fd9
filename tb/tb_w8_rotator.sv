// tb_w8_rotator -- random samples times W8^e for e = 0..3. e = 0 and e = 2
// (-j) must be exact; e = 1 and e = 3 must lie between 5.5 LSB below and
// 1 LSB above the exact rotation: each of the five truncating shifts of the
// shift-and-add constant 0.70703125 may drop up to one LSB.
// Inputs stay below 3/4 of full scale so that nothing saturates.
module tb_w8_rotator;
  int checks = 0, failures = 0;
  logic [1:0] e;
  logic signed [11:0] in_re, in_im, out_re, out_im;

  w8_rotator #(.W(12)) dut (.*);

  initial begin
    for (int t = 0; t < 8000; t++) begin
      real xr, xi, c, er, ei;
      in_re = 12'(int'($urandom_range(2800)) - 1400);
      in_im = 12'(int'($urandom_range(2800)) - 1400);
      e     = 2'(t % 4);
      #1;
      xr = in_re; xi = in_im; c = 0.70710678118654752;
      case (e)
        0: begin er = xr;            ei = xi;            end
        1: begin er = (xr + xi) * c; ei = (xi - xr) * c; end
        2: begin er = xi;            ei = -xr;           end
        default: begin er = (xi - xr) * c; ei = (-xr - xi) * c; end
      endcase
      checks++;
      if ((e[0] == 0 && (real'(out_re) != er || real'(out_im) != ei)) ||
          (e[0] == 1 && ((real'(out_re) - er) > 1.0 || (er - real'(out_re)) > 5.5 ||
                           (real'(out_im) - ei) > 1.0 || (ei - real'(out_im)) > 5.5))) begin
        failures++;
        if (failures < 5) $display("e=%0d (%0d,%0d): got (%0d,%0d) expected (%0.2f,%0.2f)", e, in_re, in_im, out_re, out_im, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
