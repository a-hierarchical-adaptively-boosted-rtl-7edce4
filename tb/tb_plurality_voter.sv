// tb_plurality_voter: feeds all 45 one-vs-one decisions of random images and
// checks the per-class vote counts (pair order 0v1, 0v2, ..., 8v9) and the
// winning class, lowest index on a tie; also checks `clr`. Finally it builds a
// set of 45 pairwise results whose per-class totals are the example vote table
// 3 3 4 4 3 9 5 5 3 6 (classes 0..9) and checks that class 5 wins.
module tb_plurality_voter;
  import abc_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, vote_en = 0, y_bin = 0;
  logic [N_W-1:0] n = '0;
  logic [5:0] votes [N_CLASS];
  logic [3:0] y_hat;
  int checks = 0, failures = 0;

  plurality_voter dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Orient the 45 pairs so that class c wins tgt[c] of them: start from any
  // orientation and reverse a winning path from a class above its target to a
  // class below it until all totals match.
  task automatic example_table();
    int tgt [10] = '{3, 3, 4, 4, 3, 9, 5, 5, 3, 6};
    bit beats [10][10];
    int sc [10];
    int prev [10];
    int iter;
    for (int a = 0; a < 10; a++) for (int b = 0; b < 10; b++) beats[a][b] = (a < b);
    for (iter = 0; iter < 200; iter++) begin
      int u, v;
      int q [$];
      u = -1; v = -1;
      for (int c = 0; c < 10; c++) begin
        sc[c] = 0;
        for (int d = 0; d < 10; d++) if (beats[c][d]) sc[c]++;
      end
      for (int c = 0; c < 10; c++) if (sc[c] > tgt[c] && u < 0) u = c;
      if (u < 0) break;
      for (int c = 0; c < 10; c++) prev[c] = -2;
      prev[u] = -1;
      q.push_back(u);
      while (q.size() > 0 && v < 0) begin
        int x;
        x = q.pop_front();
        for (int y = 0; y < 10; y++)
          if (beats[x][y] && prev[y] == -2) begin
            prev[y] = x;
            if (sc[y] < tgt[y]) v = y;
            q.push_back(y);
          end
      end
      if (v < 0) break;
      while (prev[v] >= 0) begin
        int x;
        x = prev[v];
        beats[x][v] = 0;
        beats[v][x] = 1;
        v = x;
      end
    end
    @(negedge clk) clr = 1;
    @(negedge clk) clr = 0;
    begin
      int k;
      k = 0;
      for (int a = 0; a < 10; a++)
        for (int b = a + 1; b < 10; b++) begin
          n = 6'(k); y_bin = beats[a][b]; vote_en = 1;
          @(negedge clk);
          k++;
        end
    end
    vote_en = 0;
    @(negedge clk);
    for (int c = 0; c < 10; c++) begin
      checks++;
      if (int'(votes[c]) != tgt[c]) begin failures++; $display("class %0d votes %0d want %0d", c, votes[c], tgt[c]); end
    end
    checks++;
    if (y_hat != 4'd5) begin failures++; $display("example table: y_hat %0d", y_hat); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      int cnt [10];
      int k, best;
      int fav;
      fav = $urandom_range(9);
      for (int c = 0; c < 10; c++) cnt[c] = 0;
      @(negedge clk) clr = 1;
      @(negedge clk) clr = 0;
      k = 0;
      for (int a = 0; a < 10; a++)
        for (int b = a + 1; b < 10; b++) begin
          logic yb;
          yb = (t % 2 == 0) ? 1'($urandom) : ((a == fav) ? 1'b1 : (b == fav) ? 1'b0 : 1'($urandom));
          if (yb) cnt[a]++; else cnt[b]++;
          n = 6'(k); y_bin = yb; vote_en = 1;
          @(negedge clk);
          k++;
        end
      vote_en = 0;
      @(negedge clk);
      best = 0;
      for (int c = 1; c < 10; c++) if (cnt[c] > cnt[best]) best = c;
      for (int c = 0; c < 10; c++) begin
        checks++;
        if (int'(votes[c]) != cnt[c]) failures++;
      end
      checks++;
      if (int'(y_hat) != best) begin failures++; $display("y_hat %0d want %0d", y_hat, best); end
    end
    @(negedge clk) clr = 1;
    @(negedge clk) clr = 0;
    checks++;
    if (votes[3] != 0 || y_hat != 0) failures++;
    example_table();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
