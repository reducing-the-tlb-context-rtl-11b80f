// bank_tag_unit_tb: self-checking test of the shared bank tags.
//
// A reference model keeps per bank a tag, valid and current bits and the
// time of its last activation. Random activations (tags drawn from 40 tasks,
// more than the 32 banks, so banks are reclaimed), context switches and
// clear-TLB pulses are applied. For each activation the model predicts the
// bank (the bank already holding the tag, else the lowest invalid bank, else
// the bank activated longest ago), whether it is reused, and the flush
// vector; after every event the current bank is compared.
module bank_tag_unit_tb;
  localparam int unsigned NB = 32, TW = 17;

  logic clk = 0, rst_n = 0;
  logic ctx_switch = 0, clear_tlb = 0, act_valid = 0;
  logic [TW-1:0] act_tag = '0;
  logic act_reused, cur_valid;
  logic [NB-1:0] flush_vec, cur_onehot;
  logic [$clog2(NB)-1:0] cur_idx;
  int checks = 0, failures = 0;
  int n_new = 0, n_reuse = 0, n_evict = 0;

  bank_tag_unit #(.NUM_BANKS(NB), .TAG_WIDTH(TW), .CLEAR_ALL(1'b1)) dut (.*);
  always #5 clk = ~clk;

  logic [TW-1:0] m_tag [NB];
  bit m_v [NB];
  int m_cur = -1;
  longint m_t [NB];
  longint now = 1;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic check_cur();
    @(negedge clk); #1;
    check(cur_valid === (m_cur >= 0), "cur_valid");
    if (m_cur >= 0) check(cur_idx === m_cur && cur_onehot === (NB'(1) << m_cur), "cur_idx");
    else            check(cur_onehot === '0, "cur_onehot");
  endtask

  task automatic activate(logic [TW-1:0] tag);
    int idx = -1; bit reuse = 0; logic [NB-1:0] fv = '0;
    for (int b = 0; b < NB; b++) if (idx < 0 && m_v[b] && m_tag[b] == tag) begin idx = b; reuse = 1; end
    if (idx < 0) for (int b = 0; b < NB; b++) if (idx < 0 && !m_v[b]) idx = b;
    if (idx < 0) begin
      idx = 0;
      for (int b = 1; b < NB; b++) if (m_t[b] < m_t[idx]) idx = b;
      n_evict++;
    end
    if (!reuse) fv[idx] = 1'b1;
    @(negedge clk); act_valid = 1; act_tag = tag; #1;
    check(act_reused === reuse, "act_reused");
    check(flush_vec === fv, "flush_vec on activate");
    @(posedge clk); #1 act_valid = 0;
    m_tag[idx] = tag; m_v[idx] = 1; m_cur = idx; m_t[idx] = now++;
    if (reuse) n_reuse++; else n_new++;
    check_cur();
  endtask

  task automatic switch_ctx();
    @(negedge clk); ctx_switch = 1; #1;
    check(flush_vec === '0, "no flush on context switch");
    @(posedge clk); #1 ctx_switch = 0;
    m_cur = -1;
    check_cur();
  endtask

  task automatic clear();
    @(negedge clk); clear_tlb = 1; #1;
    check(flush_vec === '1, "flush all on clear");
    @(posedge clk); #1 clear_tlb = 0;
    m_cur = -1;
    for (int b = 0; b < NB; b++) m_v[b] = 0;
    check_cur();
  endtask

  initial begin
    for (int b = 0; b < NB; b++) begin m_v[b] = 0; m_t[b] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    check_cur();
    // 32 tasks fill the banks, a revisit reuses, a 33rd evicts the oldest
    for (int t = 0; t < NB; t++) begin activate(TW'(100 + t)); switch_ctx(); end
    activate(TW'(100 + 5)); switch_ctx();
    activate(TW'(999)); switch_ctx();
    activate(TW'(100)); switch_ctx();   // task 100 was evicted: new bank
    clear();
    activate(TW'(101));
    for (int k = 0; k < 3000; k++) begin
      int r;
      r = $urandom_range(0, 99);
      if (r < 2) clear();
      else if (r < 50) switch_ctx();
      else activate(TW'(200 + $urandom_range(0, 39)));
    end
    check(n_new > 0 && n_reuse > 0 && n_evict > 0, "all activation kinds seen");
    $display("activations: new=%0d reused=%0d evictions=%0d", n_new, n_reuse, n_evict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
