// plurality_voter: turns the 45 one-versus-one strong decisions into a class.
//
// Strong classifier n separates the class pair (a, b), a < b, numbered
// 0v1, 0v2, ..., 0v9, 1v2, ..., 8v9. A decision y_bin = 1 is a vote for a,
// y_bin = 0 a vote for b (this design's polarity). y_hat is the class with the
// most votes, the lower class index winning a tie (this design's choice).
// Timing: `clr` clears the counts; a vote_en cycle adds one vote, visible in
// votes and y_hat the next cycle.
module plurality_voter
  import abc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              vote_en,
  input  logic [N_W-1:0]    n,
  input  logic              y_bin,
  output logic [5:0]        votes [N_CLASS],
  output logic [3:0]        y_hat
);
  logic [7:0] pair;
  assign pair = class_pair(n);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < int'(N_CLASS); c++) votes[c] <= '0;
    end else if (clr) begin
      for (int c = 0; c < int'(N_CLASS); c++) votes[c] <= '0;
    end else if (vote_en) begin
      if (y_bin) votes[pair[7:4]] <= votes[pair[7:4]] + 1'b1;
      else       votes[pair[3:0]] <= votes[pair[3:0]] + 1'b1;
    end
  end

  always_comb begin
    logic [5:0] best;
    best  = votes[0];
    y_hat = '0;
    for (int c = 1; c < int'(N_CLASS); c++)
      if (votes[c] > best) begin
        best  = votes[c];
        y_hat = 4'(c);
      end
  end
endmodule
