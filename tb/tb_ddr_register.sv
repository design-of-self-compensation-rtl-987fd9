// tb_ddr_register -- checks the double-data-rate register in two ways.
//
// 1. Function table: d changes in the middle of each clock phase. After every
//    rising and every falling edge, q must equal the value d had at that
//    edge. It must then hold that value through the rest of the phase, even
//    though d changes in between.
// 2. Against a reference pipeline: three ddr_register stages in a row run on
//    a clock of period 20. A three-stage edge-triggered reference runs on a
//    clock of period 10 whose rising edges coincide with both edges of the
//    slow clock. Both get the same random stream, one word per 10 time units.
//    The DDR pipeline's output must match the reference at every sample point.
//    This is the document's claim that DDR registers reach the same
//    throughput at half the clock frequency.
module tb_ddr_register;
  localparam int W = 8, N = 200;
  int checks = 0, failures = 0;
  logic clk, fclk;
  logic [W-1:0] d = '0, q;
  logic [W-1:0] at_edge;

  logic [W-1:0] s_d = '0;
  logic [W-1:0] s_q [3];
  logic [W-1:0] r_q [3];

  ddr_register #(.W(W)) dut (.clk, .d, .q);

  ddr_register #(.W(W)) p0 (.clk, .d(s_d),    .q(s_q[0]));
  ddr_register #(.W(W)) p1 (.clk, .d(s_q[0]), .q(s_q[1]));
  ddr_register #(.W(W)) p2 (.clk, .d(s_q[1]), .q(s_q[2]));

  always_ff @(posedge fclk) begin
    r_q[0] <= s_d;
    r_q[1] <= r_q[0];
    r_q[2] <= r_q[1];
  end

  // Slow clock: period 20, edges at 10, 20, 30, ...; fast clock: period 10,
  // rising edges at 5, 15, ... shifted so they coincide with slow edges at 10, 20, ...
  always #10 clk = ~clk;
  initial begin
    clk = 0; fclk = 0;
    #5;
    forever #5 fclk = ~fclk;
  end

  initial begin
    // Part 1: d changes at t = 10k + 5, half way through each phase.
    #5;
    for (int i = 0; i < N; i++) begin
      d = W'($urandom);
      #5;                      // clock edge at t = 10(i+1)
      at_edge = d;
      #1;
      checks++;
      if (q !== at_edge) begin
        failures++;
        $display("t=%0t: q=%h just after edge, d at edge %h", $time, q, at_edge);
      end
      #2;
      d = ~d;                  // a change that q must ignore
      #1;
      checks++;
      if (q !== at_edge) begin
        failures++;
        $display("t=%0t: q=%h followed d inside the phase, expected %h", $time, q, at_edge);
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Part 2: new stream word half way between edges; compare at t = 10k + 9.
  initial begin
    #5;
    for (int i = 0; i < N - 1; i++) begin
      s_d = W'($urandom);
      #4;
      if (i >= 4) begin
        checks++;
        if (s_q[2] !== r_q[2]) begin
          failures++;
          $display("t=%0t: DDR pipeline %h, reference %h", $time, s_q[2], r_q[2]);
        end
      end
      #6;
    end
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
