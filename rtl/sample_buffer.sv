// sample_buffer -- 256 x 14-bit sample memory of the FFT chip, holding one
// 128-point frame as interleaved words (address 2i = real part of sample i,
// 2i+1 = imaginary part).
//
// It is written one word per cycle from the chip's serial input and read one
// word per cycle to the serial output; towards the FFT core it offers four
// complex read ports and four complex write ports (addressed by sample index),
// so that four samples per cycle can be fetched and four results stored.
// Written as a register array. Neither write port has priority: the chip
// controller never uses the serial and the parallel write ports in the same
// cycle. Reads are combinational, writes take effect at the clock edge.
module sample_buffer
  import scfw_pkg::*;
#(
  parameter int DW    = 14,          // word width
  parameter int WORDS = 2*FFT_POINTS // 256
) (
  input  logic                     clk,
  // serial word port
  input  logic                     wr_en,
  input  logic [$clog2(WORDS)-1:0] wr_addr,
  input  logic [DW-1:0]            wr_data,
  input  logic [$clog2(WORDS)-1:0] rd_addr,
  output logic [DW-1:0]            rd_data,
  // parallel complex ports, one per data path
  input  logic [$clog2(WORDS)-2:0] pr_idx [LANES],
  output logic [DW-1:0]            pr_re  [LANES],
  output logic [DW-1:0]            pr_im  [LANES],
  input  logic                     pw_en,
  input  logic [$clog2(WORDS)-2:0] pw_idx [LANES],
  input  logic [DW-1:0]            pw_re  [LANES],
  input  logic [DW-1:0]            pw_im  [LANES]
);
  logic [DW-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (pw_en)
      for (int l = 0; l < LANES; l++) begin
        mem[{pw_idx[l], 1'b0}] <= pw_re[l];
        mem[{pw_idx[l], 1'b1}] <= pw_im[l];
      end
  end

  assign rd_data = mem[rd_addr];
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      pr_re[l] = mem[{pr_idx[l], 1'b0}];
      pr_im[l] = mem[{pr_idx[l], 1'b1}];
    end
  end

endmodule
