// tb_fg_calibrator: calibrates one row group against a comparator model with
// random offsets (q = T + offset > R_k) and a reference memory holding the
// group. Checks that the ramp covers 0..255, that the group is read back and
// rewritten with T - dT (clipped to 0..255, dT found by searching the ramp
// independently here), that calibrated thresholds realise the original ones,
// and the duration (256 comparisons).
module tb_fg_calibrator;
  import abc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [GRP_W-1:0] grp = 7'd37;
  logic mem_en, mem_we, cmp_start, active, done;
  logic [GRP_W+1:0] mem_row;
  logic [1:0] mem_col;
  logic [IO_W-1:0] mem_wdata, mem_rdata;
  logic cmp_done = 0;
  logic [N_CMP-1:0] q = '0;
  pix_t ramp;
  pix_t words [N_CMP], orig [N_CMP];
  int ofs [N_CMP];
  int checks = 0, failures = 0, n_cmp = 0, next_ramp = 0, writes = 0;

  fg_calibrator dut (.*);
  always #5 clk = ~clk;

  // reference memory for the group
  always_ff @(posedge clk) begin
    if (mem_en) begin
      if (mem_row[GRP_W+1:2] !== grp) failures++;
      if (mem_we) begin
        writes++;
        for (int j = 0; j < 32; j++) begin
          int w;
          w = int'(mem_col) * 32 + j;
          words[w][4 + int'(mem_row[1:0])] <= mem_wdata[2*j];
          words[w][int'(mem_row[1:0])]     <= mem_wdata[2*j+1];
        end
      end else begin
        pix_t ws [CMP_PER_CB];
        for (int j = 0; j < 32; j++) ws[j] = words[int'(mem_col)*32 + j];
        mem_rdata <= pack_slice(ws, mem_row[1:0]);
      end
    end
  end

  // comparison model: answers each request three cycles later
  int   dly = 0;
  pix_t r_q;
  always_ff @(posedge clk) begin
    cmp_done <= 1'b0;
    if (cmp_start) begin
      checks++;
      if (!active || int'(ramp) != next_ramp) failures++;
      next_ramp++;
      n_cmp++;
      r_q <= ramp;
      dly <= 3;
    end else if (dly > 1) dly <= dly - 1;
    else if (dly == 1) begin
      dly <= 0;
      for (int w = 0; w < 128; w++) q[w] <= (int'(orig[w]) + ofs[w]) > int'(r_q);
      cmp_done <= 1'b1;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 128; w++) begin
      ofs[w] = $urandom_range(40) - 20;
      case (w % 16)
        0: orig[w] = 8'($urandom_range(10));          // near the bottom
        1: orig[w] = 8'(245 + $urandom_range(10));    // near the top
        default: orig[w] = 8'($urandom);
      endcase
      words[w] = orig[w];
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (done);
    @(negedge clk);
    checks++;
    if (n_cmp != 256 || writes != 16) begin
      failures++;
      $display("comparisons %0d writes %0d", n_cmp, writes);
    end
    for (int w = 0; w < 128; w++) begin
      int tr, e;
      tr = 256;
      for (int k = 255; k >= 0; k--) if (!((int'(orig[w]) + ofs[w]) > k)) tr = k;
      e = 2 * int'(orig[w]) - tr;
      if (e < 0) e = 0;
      if (e > 255) e = 255;
      checks++;
      if (int'(words[w]) != e) begin
        failures++;
        if (failures < 5) $display("w=%0d T=%0d ofs=%0d new=%0d want %0d", w, orig[w], ofs[w], words[w], e);
      end
      // away from the rails the realised threshold is the original one
      if (int'(orig[w]) + ofs[w] >= 0 && int'(orig[w]) + ofs[w] <= 255 &&
          int'(orig[w]) - ofs[w] >= 0 && int'(orig[w]) - ofs[w] <= 255) begin
        checks++;
        if (int'(words[w]) + ofs[w] != int'(orig[w])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
