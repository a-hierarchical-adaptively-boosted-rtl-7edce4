// tb_crossbar_switch: checks the crossbar routing (HA) against the pixel index
// of each comparator, and that the LP bypass over both halves presents each of
// the 256 pixels to exactly one comparator.
module tb_crossbar_switch;
  import abc_pkg::*;
  pix_t bank_pix [N_BANK][BANK_PIX];
  logic cb_en, half;
  logic [IDX_W-1:0] p_idx [N_CMP];
  pix_t cmp_pix [N_CMP];
  int checks = 0, failures = 0;
  int seen [256];

  crossbar_switch dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // pixel value identifies its image position: bank g index j -> 4j+g
    for (int g = 0; g < 4; g++) for (int j = 0; j < 64; j++) bank_pix[g][j] = 8'(4*j + g);
    for (int t = 0; t < 50; t++) begin
      cb_en = 1; half = 1'($urandom);
      for (int w = 0; w < 128; w++) p_idx[w] = 6'($urandom);
      #1;
      for (int w = 0; w < 128; w++) begin
        checks++;
        if (cmp_pix[w] !== 8'(4*int'(p_idx[w]) + w/32)) begin
          failures++;
          if (failures < 5) $display("HA w=%0d got %0d", w, cmp_pix[w]);
        end
      end
    end
    for (int i = 0; i < 256; i++) seen[i] = 0;
    cb_en = 0;
    for (int h = 0; h < 2; h++) begin
      half = 1'(h);
      #1;
      for (int w = 0; w < 128; w++) begin
        seen[cmp_pix[w]]++;
        checks++;
        if (cmp_pix[w] !== 8'(4*(h*32 + w%32) + w/32)) failures++;
      end
    end
    for (int i = 0; i < 256; i++) begin
      checks++;
      if (seen[i] != 1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
