// bank_tag_unit: the bank tags ("group tags") of the banked TLB.
//
// One register per bank holds a task tag, a valid bit, a current bit and the
// bank's LRU rank. At most one bank is current: it holds the translations of
// the running task, and only its hits are used. The unit serves four events:
//  * activate (act_valid, act_tag): no bank is current and the first
//    translation of the task has just been produced. If a valid bank already
//    carries act_tag, that bank becomes current again and keeps its entries
//    (act_reused = 1). Otherwise a victim bank is chosen, the lowest invalid
//    bank or else the least recently activated one; it is flushed in both the
//    ITLB and the DTLB (flush_vec), takes act_tag, and becomes valid and
//    current. Either way the bank becomes most recently used.
//  * context switch (ctx_switch): every current bit is cleared; nothing else.
//  * clear TLB (clear_tlb), sent by the OS on page swapping or frame release:
//    with CLEAR_ALL = 1 (processors without ASIDs, the default) every valid
//    and current bit is cleared and every bank flushed; with CLEAR_ALL = 0
//    only the current bank is invalidated and flushed.
// The task tag is either the PPN of the instruction that starts the task
// (x86-style) or an ASID; the unit only compares it. Clearing the current
// bit on clear TLB, the priority clear > switch > activate, and the LRU rank
// scheme are this design's own choices.
// Timing: events are registered on the rising edge; flush_vec is
// combinational in the cycle of the event, so the banks flush on the same
// edge that changes the tags. cur_* outputs come from registers.
module bank_tag_unit #(
  parameter int unsigned NUM_BANKS = tlb_pkg::NUM_BANKS_DEF,
  parameter int unsigned TAG_WIDTH = tlb_pkg::TASK_TAG_WIDTH_DEF,
  parameter bit          CLEAR_ALL = 1'b1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         ctx_switch,
  input  logic                         clear_tlb,
  input  logic                         act_valid,
  input  logic [TAG_WIDTH-1:0]         act_tag,
  output logic                         act_reused,
  output logic [NUM_BANKS-1:0]         flush_vec,
  output logic                         cur_valid,
  output logic [NUM_BANKS-1:0]         cur_onehot,
  output logic [$clog2(NUM_BANKS)-1:0] cur_idx
);
  localparam int unsigned BW = $clog2(NUM_BANKS);

  logic [TAG_WIDTH-1:0] tag_q [NUM_BANKS];
  logic [NUM_BANKS-1:0] valid_q, current_q;

  logic [BW-1:0] match_idx, inval_idx, lru_idx, act_idx;
  logic          match_any, inval_any;
  logic          do_act;

  assign do_act = act_valid && !clear_tlb && !ctx_switch;

  always_comb begin
    match_any = 1'b0;  match_idx = '0;
    inval_any = 1'b0;  inval_idx = '0;
    for (int unsigned b = 0; b < NUM_BANKS; b++) begin
      if (valid_q[b] && tag_q[b] == act_tag && !match_any) begin
        match_any = 1'b1;  match_idx = BW'(b);
      end
      if (!valid_q[b] && !inval_any) begin
        inval_any = 1'b1;  inval_idx = BW'(b);
      end
    end
    act_idx    = match_any ? match_idx : (inval_any ? inval_idx : lru_idx);
    act_reused = act_valid && match_any;
  end

  always_comb begin
    flush_vec = '0;
    if (clear_tlb) begin
      flush_vec = CLEAR_ALL ? '1 : current_q;
    end else if (do_act && !match_any) begin
      flush_vec[act_idx] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q   <= '0;
      current_q <= '0;
    end else if (clear_tlb) begin
      current_q <= '0;
      valid_q   <= CLEAR_ALL ? '0 : (valid_q & ~current_q);
    end else if (ctx_switch) begin
      current_q <= '0;
    end else if (do_act) begin
      current_q          <= '0;
      current_q[act_idx] <= 1'b1;
      valid_q[act_idx]   <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_act && !match_any) tag_q[act_idx] <= act_tag;
  end

  lru_rank #(.N(NUM_BANKS)) u_lru (
    .clk       (clk),
    .rst_n     (rst_n),
    .touch     (do_act),
    .touch_idx (act_idx),
    .lru_idx   (lru_idx)
  );

  assign cur_onehot = current_q;
  assign cur_valid  = |current_q;
  always_comb begin
    cur_idx = '0;
    for (int unsigned b = 0; b < NUM_BANKS; b++)
      if (current_q[b]) cur_idx = BW'(b);
  end

  // At most one bank is current at any time.
  a_one_current: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(current_q));

endmodule
