// tb_sample_buffer -- fills the 256-word memory through the serial port,
// reads it back serially and through the four parallel complex ports, then
// overwrites every sample through the parallel write ports (a permuted index
// pattern) and checks the new contents through the serial port.
module tb_sample_buffer;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic wr_en = 0, pw_en = 0;
  logic [7:0] wr_addr = '0, rd_addr = '0;
  logic [13:0] wr_data = '0, rd_data;
  logic [6:0]  pr_idx [4], pw_idx [4];
  logic [13:0] pr_re [4], pr_im [4], pw_re [4], pw_im [4];
  logic [13:0] ref_mem [256];

  sample_buffer #(.DW(14)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int l = 0; l < 4; l++) begin pr_idx[l] = '0; pw_idx[l] = '0; pw_re[l] = '0; pw_im[l] = '0; end
    for (int a = 0; a < 256; a++) begin
      ref_mem[a] = 14'($urandom);
      @(negedge clk);
      wr_en = 1; wr_addr = 8'(a); wr_data = ref_mem[a];
    end
    @(negedge clk) wr_en = 0;
    for (int a = 0; a < 256; a++) begin
      rd_addr = 8'(a);
      #1; checks++;
      if (rd_data != ref_mem[a]) begin failures++; $display("serial read %0d", a); end
    end
    for (int m = 0; m < 32; m++) begin
      for (int l = 0; l < 4; l++) pr_idx[l] = 7'(4*m + l);
      #1;
      for (int l = 0; l < 4; l++) begin
        checks++;
        if (pr_re[l] != ref_mem[2*(4*m+l)] || pr_im[l] != ref_mem[2*(4*m+l)+1]) begin
          failures++; $display("parallel read sample %0d", 4*m+l);
        end
      end
    end
    for (int m = 0; m < 32; m++) begin
      @(negedge clk);
      pw_en = 1;
      for (int l = 0; l < 4; l++) begin
        pw_idx[l] = 7'((4*m + l) * 37);       // 37 is odd: a permutation of 0..127
        pw_re[l]  = 14'($urandom);
        pw_im[l]  = 14'($urandom);
        ref_mem[2*pw_idx[l]]   = pw_re[l];
        ref_mem[2*pw_idx[l]+1] = pw_im[l];
      end
    end
    @(negedge clk) pw_en = 0;
    for (int a = 0; a < 256; a++) begin
      rd_addr = 8'(a);
      #1; checks++;
      if (rd_data != ref_mem[a]) begin failures++; $display("read after parallel write %0d", a); end
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
