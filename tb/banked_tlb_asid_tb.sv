// banked_tlb_asid_tb: the banked TLB on a processor with address-space IDs.
//
// The top is run with USE_ASID = 1 (the task tag is the asid input, not the
// walked PPN) and CLEAR_ALL = 0 (clear TLB invalidates only the running
// task's bank), at a reduced size of 4 banks of 8 entries, with 6 tasks so
// that banks are reclaimed. Tasks resume at arbitrary pages: with an ASID
// the bank is still found. Clear TLB changes the page table of the running
// task only, so a stale entry of that task, or a lost entry of another task,
// would show. Checked: every answer against the page tables; directed steps
// for reuse at a different resume page, the partial clear, and LRU bank
// eviction; counts of new, reused and evicted banks.
module banked_tlb_asid_tb;
  import tlb_pkg::*;
  import tb_mem_pkg::*;
  localparam int unsigned LAT = 3, NB = 4, NE = 8, NTASK = 6;

  logic clk = 0, rst_n = 0;
  logic ctx_switch = 0, clear_tlb = 0;
  logic [16:0] asid = '0;
  logic i_lk_valid = 0, i_lk_ready, i_rsp_valid, i_rsp_fault;
  logic [31:0] i_lk_va = '0, i_rsp_pa;
  tlb_src_e i_rsp_src;
  logic i_mem_req_valid, i_mem_req_ready, i_mem_req_prefetch, i_mem_rsp_valid, i_mem_rsp_fault;
  logic [16:0] i_mem_req_vpn, i_mem_rsp_ppn;
  logic d_lk_valid = 0, d_lk_ready, d_rsp_valid, d_rsp_fault;
  logic [31:0] d_lk_va = '0, d_rsp_pa;
  tlb_src_e d_rsp_src;
  logic d_mem_req_valid, d_mem_req_ready, d_mem_req_prefetch, d_mem_rsp_valid, d_mem_rsp_fault;
  logic [16:0] d_mem_req_vpn, d_mem_rsp_ppn;
  logic cur_valid, bank_activate, bank_reused, i_prefetching, d_prefetching;
  logic [1:0] cur_idx;

  int unsigned task_id = 0;
  int unsigned epoch [NTASK];
  int unsigned map_id;
  assign map_id = task_id + 64 * epoch[task_id];

  banked_tlb #(.NUM_BANKS(NB), .BANK_ENTRIES(NE), .USE_ASID(1'b1), .CLEAR_ALL(1'b0)) dut (.*);

  mem_system_model #(.LATENCY(LAT)) u_imem (
    .clk, .rst_n, .task_id (map_id),
    .req_valid (i_mem_req_valid), .req_ready (i_mem_req_ready), .req_vpn (i_mem_req_vpn),
    .req_prefetch (i_mem_req_prefetch), .rsp_valid (i_mem_rsp_valid), .rsp_ppn (i_mem_rsp_ppn),
    .rsp_fault (i_mem_rsp_fault)
  );
  mem_system_model #(.LATENCY(LAT)) u_dmem (
    .clk, .rst_n, .task_id (map_id),
    .req_valid (d_mem_req_valid), .req_ready (d_mem_req_ready), .req_vpn (d_mem_req_vpn),
    .req_prefetch (d_mem_req_prefetch), .rsp_valid (d_mem_rsp_valid), .rsp_ppn (d_mem_rsp_ppn),
    .rsp_fault (d_mem_rsp_fault)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_new = 0, n_reuse = 0, n_evict = 0;

  always @(posedge clk) if (rst_n && bank_activate) begin
    if (bank_reused) n_reuse++;
    else begin
      n_new++;
      if (&dut.u_tags.valid_q) n_evict++;
    end
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic lookup(bit side, logic [31:0] va, output tlb_src_e src);
    logic [16:0] vpn;
    bit flt;
    logic [31:0] pa;
    vpn = va[31:15];
    @(negedge clk);
    if (side) begin d_lk_valid = 1; d_lk_va = va; end
    else      begin i_lk_valid = 1; i_lk_va = va; end
    #1;
    while (side ? !d_lk_ready : !i_lk_ready) begin @(negedge clk); #1; end
    if (!(side ? d_rsp_valid : i_rsp_valid)) begin
      @(posedge clk); #1;
      if (side) d_lk_valid = 0; else i_lk_valid = 0;
      do begin @(negedge clk); #1; end while (side ? !d_rsp_valid : !i_rsp_valid);
    end
    src = side ? d_rsp_src : i_rsp_src;
    flt = side ? d_rsp_fault : i_rsp_fault;
    pa  = side ? d_rsp_pa : i_rsp_pa;
    check(flt === pt_fault(map_id, vpn), "fault bit");
    if (!flt) check(pa === {pt_ppn(map_id, vpn), va[14:0]}, "PA");
    @(posedge clk); #1;
    if (side) d_lk_valid = 0; else i_lk_valid = 0;
  endtask

  task automatic settle();
    do @(negedge clk); while (i_prefetching || d_prefetching || !i_lk_ready || !d_lk_ready);
  endtask

  task automatic switch_to(int unsigned t);
    settle();
    @(negedge clk); ctx_switch = 1;
    @(negedge clk); ctx_switch = 0; task_id = t; asid = 17'(100 + t);
  endtask

  task automatic clear_running();
    settle();
    @(negedge clk); clear_tlb = 1;
    @(negedge clk); clear_tlb = 0; epoch[task_id]++;
  endtask

  function automatic logic [31:0] va_of(int unsigned vpn);
    return {17'(vpn), 15'($urandom)};
  endfunction

  initial begin
    tlb_src_e s;
    int r0, e0;
    for (int t = 0; t < NTASK; t++) epoch[t] = 0;
    repeat (3) @(posedge clk); rst_n = 1;

    switch_to(0);
    lookup(0, va_of('h105), s); check(s === SRC_WALK, "task 0 opens a bank");
    check(dut.u_tags.tag_q[cur_idx] === 17'd100, "task tag is the ASID");
    lookup(0, va_of('h105), s); check(s === SRC_BANK, "task 0 hit");
    lookup(0, va_of('h305), s); settle();
    switch_to(1);
    lookup(0, va_of('h405), s); check(s === SRC_WALK, "task 1 opens a bank");
    lookup(0, va_of('h405), s); check(s === SRC_BANK, "task 1 hit");
    settle();
    // task 0 resumes at a different page: its bank is found by the ASID
    switch_to(0);
    r0 = n_reuse;
    lookup(0, va_of('h305), s);
    check(n_reuse === r0 + 1, "task 0 bank reused by ASID");
    lookup(0, va_of('h105), s); check(s === SRC_BANK, "task 0 page kept");
    // clear TLB affects only task 0's bank
    clear_running();
    lookup(0, va_of('h105), s); check(s === SRC_WALK, "task 0 walks after clear");
    settle();
    switch_to(1);
    r0 = n_reuse;
    lookup(0, va_of('h205), s); check(n_reuse === r0 + 1, "task 1 bank survives the clear");
    lookup(0, va_of('h405), s); check(s === SRC_BANK, "task 1 page survives the clear");
    // 6 tasks on 4 banks: the least recently activated bank is reclaimed
    e0 = n_evict;
    for (int t = 2; t < NTASK; t++) begin
      switch_to(t);
      lookup(0, va_of('h105 + 'h100 * t), s);
    end
    check(n_evict > e0, "a bank was reclaimed");
    // random mix
    for (int k = 0; k < 3000; k++) begin
      int unsigned r;
      r = $urandom_range(0, 199);
      if (r == 0) clear_running();
      else if (r < 5) switch_to($urandom_range(0, NTASK - 1));
      lookup($urandom_range(0, 1), va_of('h100 * task_id + $urandom_range(0, 40)), s);
    end
    $display("banks new=%0d reused=%0d evicted=%0d", n_new, n_reuse, n_evict);
    check(n_new > 0 && n_reuse > 0 && n_evict > 0, "all activation kinds seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
