// tb_dss_input_buffer: streams a random image into the DSS input buffer and
// checks that pixel i appears in bank i%4 at index i/4, that a rewrite updates
// only its 8 pixels, and that reset clears the buffer.
module tb_dss_input_buffer;
  import abc_pkg::*;
  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [4:0] wr_addr = '0;
  logic [63:0] wr_data = '0;
  pix_t bank_pix [N_BANK][BANK_PIX];
  pix_t img [256];
  int checks = 0, failures = 0;

  dss_input_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int i = 0; i < 256; i++) begin
      checks++;
      if (bank_pix[i%4][i/4] !== img[i]) begin
        failures++;
        if (failures < 5) $display("pixel %0d: got %0d want %0d", i, bank_pix[i%4][i/4], img[i]);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i++) img[i] = 8'($urandom);
    for (int a = 0; a < 32; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 5'(a);
      for (int k = 0; k < 8; k++) wr_data[8*k +: 8] = img[8*a+k];
    end
    @(negedge clk) wr_en = 0;
    @(negedge clk) check_all();
    // overwrite one group
    @(negedge clk);
    wr_en = 1; wr_addr = 5'd17;
    for (int k = 0; k < 8; k++) begin img[136+k] = 8'($urandom); wr_data[8*k +: 8] = img[136+k]; end
    @(negedge clk) wr_en = 0;
    @(negedge clk) check_all();
    rst_n = 0;
    @(negedge clk);
    for (int i = 0; i < 256; i++) img[i] = '0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
