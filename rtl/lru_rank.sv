// lru_rank: true-LRU bookkeeping for N ways by recency ranks.
//
// Every way holds a rank 0..N-1; rank 0 is the most recently used and rank
// N-1 the least recently used, and the ranks always form a permutation.
// A touch of way i gives it rank 0 and ages by one every way that was more
// recent than it. lru_idx names the way whose rank is N-1. Reset sets rank i
// for way i, so way N-1 is the first victim. The rank scheme is this design's
// own choice: the source only asks for LRU replacement.
// Timing: touch is registered on the rising clock edge; lru_idx is combinational
// from the registered ranks.
module lru_rank #(
  parameter int unsigned N = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 touch,
  input  logic [$clog2(N)-1:0] touch_idx,
  output logic [$clog2(N)-1:0] lru_idx
);
  localparam int unsigned W = $clog2(N);

  logic [W-1:0] rank_q [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < N; i++) rank_q[i] <= W'(i);
    end else if (touch) begin
      for (int unsigned i = 0; i < N; i++) begin
        if (W'(i) == touch_idx)                  rank_q[i] <= '0;
        else if (rank_q[i] < rank_q[touch_idx])  rank_q[i] <= rank_q[i] + 1'b1;
      end
    end
  end

  always_comb begin
    lru_idx = '0;
    for (int unsigned i = 0; i < N; i++)
      if (rank_q[i] == W'(N - 1)) lru_idx = W'(i);
  end

endmodule
