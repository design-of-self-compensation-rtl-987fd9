// fft128_chip -- 128-point FFT processor: serial 10-bit sample input, a
// 14 x 256 sample memory, the four-path FFT core and serial 14-bit output.
//
// Operation, one frame at a time:
//   LOAD   in_ready is high; 256 words are taken on in_valid, in order
//          re(x0), im(x0), re(x1), ... (10-bit two's complement), and stored
//          sign-extended in the sample memory.
//   RUN    32 beats feed x(4m) .. x(4m+3) to the core; each beat of results
//          (four bins, located by the core's out_idx) is written back into the
//          same memory at the bin's position. The core's latency (38 cycles)
//          exceeds the 32 feed beats, so no input is overwritten before it has
//          been read.
//   UNLOAD 256 words leave on out_data with out_valid, in natural frequency
//          order re(X0), im(X0), re(X1), ...; out_last marks the final word.
//          Then the chip returns to LOAD.
// The results are the DFT scaled by 1/8 (14-bit). One word per cycle in and
// out, no back-pressure on the output. Asynchronous active-low reset.
//
// Beside the FFT sits one 14-bit double-data-rate register (ddr_d -> ddr_q).
// It is the register cell of the second chip version, which replaces every
// flip-flop with such a cell and runs at half the clock rate. The cell is not
// part of the datapath above. It has its own pins and is clocked by clk:
// ddr_q takes the value of ddr_d at every rising and every falling edge.
module fft128_chip
  import scfw_pkg::*;
#(
  parameter int W    = 10,   // input sample width
  parameter int TW_W = 10    // twiddle width
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         in_ready,
  output logic         out_valid,
  output logic [W+3:0] out_data,
  output logic         out_last,
  input  logic [W+3:0] ddr_d,
  output logic [W+3:0] ddr_q
);
  localparam int DW = W + 4;

  typedef enum logic [1:0] {S_LOAD, S_RUN, S_UNLOAD} state_t;
  state_t state;

  logic [7:0] wcnt;         // serial word counter (load and unload)
  logic [5:0] beat;         // feed beats issued in RUN
  logic [5:0] obeats;       // result beats written in RUN

  // Memory ports.
  logic [DW-1:0] rd_data;
  logic [6:0]    pr_idx [LANES], pw_idx [LANES];
  logic [DW-1:0] pr_re [LANES], pr_im [LANES], pw_re [LANES], pw_im [LANES];

  // Core ports.
  logic              c_start, c_valid, o_start, o_valid;
  logic signed [W-1:0] c_re [LANES], c_im [LANES];
  logic signed [W+3:0] o_re [LANES], o_im [LANES];
  logic [6:0]          o_idx [LANES];

  logic feeding;
  assign feeding = (state == S_RUN) && (beat < 6'(FRAME_BEATS));

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      pr_idx[l] = {beat[4:0], 2'(l)};
      c_re[l]   = pr_re[l][W-1:0];
      c_im[l]   = pr_im[l][W-1:0];
      pw_idx[l] = o_idx[l];
      pw_re[l]  = o_re[l];
      pw_im[l]  = o_im[l];
    end
  end
  assign c_start = feeding && (beat == 6'd0);
  assign c_valid = feeding;

  sample_buffer #(.DW(DW)) u_mem (
    .clk,
    .wr_en(state == S_LOAD && in_valid), .wr_addr(wcnt), .wr_data(DW'(signed'(in_data))),
    .rd_addr(wcnt), .rd_data,
    .pr_idx, .pr_re, .pr_im,
    .pw_en(state == S_RUN && o_valid), .pw_idx, .pw_re, .pw_im);

  fft128 #(.W(W), .TW_W(TW_W)) u_fft (
    .clk, .rst_n, .in_start(c_start), .in_valid(c_valid), .in_re(c_re), .in_im(c_im),
    .out_start(o_start), .out_valid(o_valid), .out_re(o_re), .out_im(o_im), .out_idx(o_idx));

  ddr_register #(.W(DW)) u_ddr (.clk, .d(ddr_d), .q(ddr_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_LOAD;
      wcnt   <= '0;
      beat   <= '0;
      obeats <= '0;
    end else begin
      unique case (state)
        S_LOAD: if (in_valid) begin
          wcnt <= wcnt + 1'b1;
          if (wcnt == 8'd255) begin
            state  <= S_RUN;
            beat   <= '0;
            obeats <= '0;
          end
        end
        S_RUN: begin
          if (feeding) beat <= beat + 1'b1;
          if (o_valid) begin
            obeats <= obeats + 1'b1;
            if (obeats == 6'(FRAME_BEATS - 1)) begin
              state <= S_UNLOAD;
              wcnt  <= '0;
            end
          end
        end
        default: begin
          wcnt <= wcnt + 1'b1;
          if (wcnt == 8'd255) state <= S_LOAD;
        end
      endcase
    end
  end

  assign in_ready  = (state == S_LOAD);
  assign out_valid = (state == S_UNLOAD);
  assign out_data  = rd_data;
  assign out_last  = (state == S_UNLOAD) && (wcnt == 8'd255);

  // Results must not arrive while samples are still being fetched.
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
                                   !(o_valid && feeding));
  a_first_result: assert property (@(posedge clk) disable iff (!rst_n)
                                   o_start |-> o_valid);

endmodule
