// tb_crossbar: random pixel sets and indices; every output must equal the
// input pixel its index selects, including many outputs on one pixel.
module tb_crossbar;
  logic [7:0] in_pix [64];
  logic [5:0] sel [32];
  logic [7:0] out_pix [32];
  int checks = 0, failures = 0;

  crossbar dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < 64; i++) in_pix[i] = 8'($urandom);
      for (int o = 0; o < 32; o++) sel[o] = (t % 4 == 0) ? 6'(t % 64) : 6'($urandom);
      #1;
      for (int o = 0; o < 32; o++) begin
        checks++;
        if (out_pix[o] !== in_pix[sel[o]]) begin
          failures++;
          if (failures < 5) $display("out %0d sel %0d: got %0d", o, sel[o], out_pix[o]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
