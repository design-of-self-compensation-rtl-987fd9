// tb_fft128_chip -- end-to-end test of the FFT chip at its default sizes.
// Three frames (random noise, a two-tone signal, a full-scale-ish tone) are
// loaded through the serial input, with idle cycles inserted during loading,
// transformed and read back serially. Each bin is compared with a
// double-precision DFT scaled by 1/8 (error below 40 LSB, frame SQNR above
// 35 dB); the output order, out_last and the time from the last input word to
// the first output word (71 cycles: the 38-cycle core latency, 32 result
// beats and one state change) are checked too.
// It also counts how often the design's mechanisms were exercised: loading
// with gaps, register-file store beats and butterfly beats of the radix-2
// stage, the shared multipliers working on the read side, non-trivial W8
// rotations inside the BU_8s and the cross-lane rotations of the last stage.
// The double-data-rate register beside the FFT gets a new random word 2 time
// units after every clock edge. One unit after every rising and falling edge,
// its output must show the word that was present at that edge.
module tb_fft128_chip;
  localparam int NF = 3;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [9:0] in_data = '0;
  logic in_ready, out_valid, out_last;
  logic [13:0] out_data;
  logic [13:0] ddr_d = '0, ddr_q;
  int ev_ddr_rise = 0, ev_ddr_fall = 0;

  int checks = 0, failures = 0;
  int xr [128], xi [128];
  int ev_gap = 0, ev_store = 0, ev_bfly = 0, ev_readmul = 0, ev_w8 = 0, ev_xlane = 0;
  longint cyc = 0, t_last_in = 0;

  fft128_chip dut (.*);

  always #5 clk = ~clk;

  always @(clk) begin
    automatic logic [13:0] at_edge = ddr_d;
    automatic logic        rise    = clk;
    #1;
    if (cyc > 1) begin
      if (rise) ev_ddr_rise++; else ev_ddr_fall++;
      checks++;
      if (ddr_q !== at_edge) begin
        failures++;
        $display("t=%0t: DDR register %h, expected %h", $time, ddr_q, at_edge);
      end
    end
    #1 ddr_d = 14'($urandom);
  end
  always @(posedge clk) begin
    cyc++;
    if (dut.u_fft.u_m1.half == 1'b0 && dut.u_fft.u_m1.rf_vld[dut.u_fft.u_m1.m]) ev_readmul++;
    if (dut.u_fft.u_m1.half == 1'b0 && dut.state == 1) ev_store++;
    if (dut.u_fft.u_m1.half == 1'b1 && dut.u_fft.u_m1.in_valid) ev_bfly++;
    if (dut.u_fft.u_m2.g_lane[1].u_bu8.e2 == 2'd1 || dut.u_fft.u_m2.g_lane[1].u_bu8.e2 == 2'd3) ev_w8++;
    if (dut.u_fft.u_m3.b1 && dut.u_fft.u_m3.s_valid[0]) ev_xlane++;
  end

  task automatic run_frame(input int f);
    int yr [128], yi [128];
    real ps, pe;
    longint t_first;
    // Load: 256 words, with a one-cycle gap after every 50 words.
    for (int w = 0; w < 256; w++) begin
      while (!in_ready) @(posedge clk);
      if (w % 50 == 49) begin
        in_valid <= 0;
        @(posedge clk);
        ev_gap++;
      end
      in_valid <= 1;
      in_data  <= 10'((w % 2 == 0) ? xr[w/2] : xi[w/2]);
      @(posedge clk);
    end
    in_valid  <= 0;
    t_last_in = cyc;
    // Unload.
    while (!out_valid) @(posedge clk);
    t_first = cyc;
    for (int w = 0; w < 256; w++) begin
      checks++;
      if (!out_valid || (out_last != (w == 255))) begin
        failures++;
        $display("frame %0d word %0d: out_valid=%0b out_last=%0b", f, w, out_valid, out_last);
      end
      if (w % 2 == 0) yr[w/2] = int'(signed'(out_data)); else yi[w/2] = int'(signed'(out_data));
      @(posedge clk);
    end
    checks++;
    if (out_valid) begin failures++; $display("out_valid still high after 256 words"); end
    checks++;
    if (t_first - t_last_in != 71) begin
      failures++;
      $display("frame %0d: %0d cycles from last input to first output, expected 71", f, t_first - t_last_in);
    end
    ps = 0; pe = 0;
    for (int k = 0; k < 128; k++) begin
      real rr, ri, er, ei;
      rr = 0; ri = 0;
      for (int n = 0; n < 128; n++) begin
        rr += xr[n]*$cos(2*PI*k*n/128) + xi[n]*$sin(2*PI*k*n/128);
        ri += xi[n]*$cos(2*PI*k*n/128) - xr[n]*$sin(2*PI*k*n/128);
      end
      rr /= 8.0; ri /= 8.0;
      er = yr[k] - rr; ei = yi[k] - ri;
      ps += rr*rr + ri*ri; pe += er*er + ei*ei;
      checks++;
      if ($sqrt(er*er + ei*ei) > 40.0) begin
        failures++;
        $display("frame %0d bin %0d: got (%0d,%0d) expected (%0.1f,%0.1f)", f, k, yr[k], yi[k], rr, ri);
      end
    end
    checks++;
    $display("frame %0d: SQNR %0.2f dB", f, 10*$log10(ps/pe));
    if (10*$log10(ps/pe) < 35.0) failures++;
  endtask

  initial begin
    rst_n = 1;     // a falling edge starts the asynchronous reset
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int f = 0; f < NF; f++) begin
      for (int n = 0; n < 128; n++) begin
        case (f)
          0: begin xr[n] = int'($urandom_range(1023)) - 512; xi[n] = int'($urandom_range(1023)) - 512; end
          1: begin
               xr[n] = int'($floor(200.0*$cos(2*PI*3*n/128) + 150.0*$cos(2*PI*40*n/128) + 0.5));
               xi[n] = int'($floor(200.0*$sin(2*PI*3*n/128) - 150.0*$sin(2*PI*40*n/128) + 0.5));
             end
          default: begin
               xr[n] = int'($floor(450.0*$cos(2*PI*100*n/128) + 0.5));
               xi[n] = int'($floor(450.0*$sin(2*PI*100*n/128) + 0.5));
             end
        endcase
      end
      run_frame(f);
    end
    $display("events: load gaps %0d, store beats %0d, butterfly beats %0d, read-side multiplies %0d, W8 rotations %0d, cross-lane rotations %0d, DDR captures %0d rising / %0d falling",
             ev_gap, ev_store, ev_bfly, ev_readmul, ev_w8, ev_xlane, ev_ddr_rise, ev_ddr_fall);
    checks += 8;
    if (ev_ddr_rise == 0) failures++;
    if (ev_ddr_fall == 0) failures++;
    if (ev_gap == 0) failures++;
    if (ev_store == 0) failures++;
    if (ev_bfly == 0) failures++;
    if (ev_readmul == 0) failures++;
    if (ev_w8 == 0) failures++;
    if (ev_xlane == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
