// tb_imc_controller: runs LP and HA comparison cycles against a reference
// memory model. Checks the phase order (crossbar read, replica rows 3..0,
// fire, charge share, compare), cb_en only in HA, the pixel indices assembled
// from the 16 normal-port reads, and the cycle count of each comparison:
// 9 + 8 cycles from start to done for LP and 18 more for HA (T0 = 1).
module tb_imc_controller;
  import abc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, ha = 0;
  logic [GRP_W-1:0] p_grp = '0, t_grp = '0;
  logic mem_en;
  logic [GRP_W+1:0] mem_row;
  logic [1:0] mem_col;
  logic [IO_W-1:0] mem_rdata;
  logic [IDX_W-1:0] p_idx [N_CMP];
  logic cb_en, fire, wl_done, pre, cs_en, comp_en, busy, done;
  logic [3:0] wwl;
  logic [GRP_W-1:0] fire_grp;
  logic [3:0] wl, rwl;
  logic wl_busy;
  logic [GRP_W-1:0] wl_grp;
  pix_t words [N_CMP];
  int checks = 0, failures = 0;

  imc_controller dut (.*);
  mrwl_driver u_wl (.clk, .rst_n, .fire, .grp(fire_grp), .grp_q(wl_grp), .wl, .rwl, .busy(wl_busy), .done(wl_done));
  always #5 clk = ~clk;

  // memory model: words of group p_grp, packed as in the array
  always_ff @(posedge clk) begin
    if (mem_en) begin
      pix_t ws [CMP_PER_CB];
      for (int j = 0; j < 32; j++) ws[j] = words[int'(mem_col)*32 + j];
      mem_rdata <= pack_slice(ws, mem_row[1:0]);
      if (mem_row[GRP_W+1:2] !== p_grp) failures++;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input logic h);
    int cyc, wr_seen, fire_at, cs_at, cmp_at, cb_cnt;
    logic [3:0] wexp;
    cyc = 0; wr_seen = 0; fire_at = -1; cs_at = -1; cmp_at = -1; cb_cnt = 0; wexp = 4'b1000;
    for (int w = 0; w < 128; w++) words[w] = {2'($urandom), 6'($urandom)};
    p_grp = 7'($urandom); t_grp = 7'($urandom);
    @(negedge clk);
    ha = h; start = 1;
    @(negedge clk);
    start = 0;
    while (!done && cyc < 200) begin
      cyc++;
      if (cb_en) cb_cnt++;
      if (wwl != 0) begin
        checks++;
        if (wwl !== wexp) failures++;
        wexp = wexp >> 1;
        wr_seen++;
      end
      if (fire) begin fire_at = cyc; checks++; if (fire_grp !== t_grp) failures++; end
      if (cs_en) cs_at = cyc;
      if (comp_en) cmp_at = cyc;
      @(negedge clk);
    end
    checks++;
    if (wr_seen != 4 || !(fire_at > 0 && cs_at > fire_at && cmp_at == cs_at + 1)) begin
      failures++;
      $display("phase order wrong: wr %0d fire %0d cs %0d cmp %0d", wr_seen, fire_at, cs_at, cmp_at);
    end
    checks++;
    if (cyc + 1 != (h ? 35 : 17)) begin
      failures++;
      $display("ha=%0d comparison took %0d cycles", h, cyc + 1);
    end
    checks++;
    if (h ? (cb_cnt == 0) : (cb_cnt != 0)) failures++;
    if (h)
      for (int w = 0; w < 128; w++) begin
        checks++;
        if (p_idx[w] !== words[w][5:0]) begin
          failures++;
          if (failures < 5) $display("p_idx[%0d]=%0d want %0d", w, p_idx[w], words[w][5:0]);
        end
      end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 10; i++) begin one(1'b0); one(1'b1); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
