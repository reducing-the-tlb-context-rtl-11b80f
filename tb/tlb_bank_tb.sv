// tlb_bank_tb: self-checking test of one TLB bank (32 entries, default size).
//
// A reference model keeps the bank's contents with a last-use time stamp per
// entry; its victim is the lowest invalid entry, else the entry used longest
// ago. Random lookups (with touch), inserts of absent pages and occasional
// flushes are applied, and every lookup's hit and PPN are compared with the
// model, which checks the CAM match, the LRU replacement and the flush.
module tlb_bank_tb;
  localparam int unsigned N = 32;
  localparam int unsigned VW = 17, PW = 17;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [VW-1:0] lk_vpn = '0, wr_vpn = '0;
  logic [PW-1:0] wr_ppn = '0, lk_ppn;
  logic lk_hit, lk_touch = 1'b0, wr_en = 1'b0, flush = 1'b0;

  int checks = 0, failures = 0;

  tlb_bank #(.ENTRIES(N), .VPN_WIDTH(VW), .PPN_WIDTH(PW)) dut (.*);

  always #5 clk = ~clk;

  // reference model
  logic [VW-1:0] m_vpn [N];
  logic [PW-1:0] m_ppn [N];
  bit            m_v   [N];
  longint        m_t   [N];
  longint        now = 0;

  function automatic int m_find(logic [VW-1:0] v);
    for (int i = 0; i < N; i++) if (m_v[i] && m_vpn[i] == v) return i;
    return -1;
  endfunction

  function automatic int m_victim();
    int best = 0;
    for (int i = 0; i < N; i++) if (!m_v[i]) return i;
    for (int i = 1; i < N; i++) if (m_t[i] < m_t[best]) best = i;
    return best;
  endfunction

  task automatic do_lookup(logic [VW-1:0] v, bit touch);
    int idx;
    @(negedge clk);
    lk_vpn = v; lk_touch = touch; wr_en = 0; flush = 0;
    #1;
    idx = m_find(v);
    checks++;
    if (lk_hit !== (idx >= 0) || (idx >= 0 && lk_ppn !== m_ppn[idx])) begin
      failures++;
      $display("FAIL lookup %h: hit=%0b ppn=%h expected hit=%0b ppn=%h", v, lk_hit, lk_ppn,
               idx >= 0, idx >= 0 ? m_ppn[idx] : '0);
    end
    if (touch && idx >= 0) m_t[idx] = now++;
    @(posedge clk); #1 lk_touch = 0;
  endtask

  task automatic do_write(logic [VW-1:0] v, logic [PW-1:0] p);
    int idx;
    @(negedge clk);
    wr_en = 1; wr_vpn = v; wr_ppn = p; lk_touch = 0;
    idx = m_victim();
    m_vpn[idx] = v; m_ppn[idx] = p; m_v[idx] = 1; m_t[idx] = now++;
    @(posedge clk); #1 wr_en = 0;
  endtask

  task automatic do_flush();
    @(negedge clk); flush = 1;
    for (int i = 0; i < N; i++) m_v[i] = 0;
    @(posedge clk); #1 flush = 0;
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin m_v[i] = 0; m_t[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // empty bank misses
    do_lookup(17'h00123, 1);
    // fill all entries
    for (int i = 0; i < N; i++) do_write(VW'(17'h100 + i), PW'(17'h4000 + 3 * i));
    for (int i = 0; i < N; i++) do_lookup(VW'(17'h100 + i), 0);
    // touch even entries, then insert 16 new pages: the odd ones must be evicted
    for (int i = 0; i < N; i += 2) do_lookup(VW'(17'h100 + i), 1);
    for (int i = 0; i < 16; i++) do_write(VW'(17'h800 + i), PW'(17'h1000 + i));
    for (int i = 0; i < N; i++) do_lookup(VW'(17'h100 + i), 0);
    for (int i = 0; i < 16; i++) do_lookup(VW'(17'h800 + i), 0);
    // flush empties the bank
    do_flush();
    for (int i = 0; i < 16; i++) do_lookup(VW'(17'h800 + i), 0);
    // random mix
    for (int k = 0; k < 3000; k++) begin
      logic [VW-1:0] v;
      int r;
      v = VW'($urandom_range(0, 63));
      r = $urandom_range(0, 99);
      if (r < 55)       do_lookup(v, 1'($urandom_range(0, 1)));
      else if (r < 99) begin
        if (m_find(v) < 0) do_write(v, PW'($urandom));
      end else          do_flush();
    end
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
