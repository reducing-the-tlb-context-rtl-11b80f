// banked_tlb_tb: end-to-end test of the banked, prefetching TLB at its
// default size (32 banks of 32 entries per side, 17-entry prefetch buffers,
// 32 KB pages, 32-bit addresses).
//
// A multiprogrammed workload runs on both sides at once. 40 tasks (more than
// the 32 banks) share the machine; a few are picked often and the rest
// rarely, so banks are both reused and reclaimed. A time slice starts at the
// task's entry page (so that the task's first instruction page, whose PPN is
// its task tag, is the same at every return), then fetches instructions
// sequentially through its code pages with occasional jumps, and makes data
// accesses, mostly near a moving pointer and sometimes at random, in its data
// region. Between slices the testbench gives a context switch; now and then
// it gives a "clear TLB" instead, and the page tables change with it. Each
// side has its own behavioural memory system that walks the running task's
// page table.
// Checked for every answer: the PA (or fault) against the page table of the
// running task; hits answer in the lookup cycle. Directed checks: the first
// fetch of a slice walks and opens a bank LAT+3 cycles after
// the lookup cycle (request, LAT cycles of memory, activation), a return to a
// task reuses its bank (no flush, its pages hit), a clear TLB makes the
// next activation a new bank, a DTLB access before any bank is current is
// answered but not stored. Every mechanism is counted and must occur:
// bank hits and prefetch-buffer hits on both sides, walks, faults, new and
// reused banks, LRU eviction of a bank, context switches, clear TLB, a
// prefetch round cut short by a switch, lookups stalled by a round, and the
// DTLB bypass.
module banked_tlb_tb;
  import tlb_pkg::*;
  import tb_mem_pkg::*;
  localparam int unsigned LAT = 4;
  localparam int unsigned NTASK = 40;
  localparam int unsigned SLICES = 160;
  localparam int unsigned SLICE_LEN = 150;

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
  logic [4:0] cur_idx;
  int unsigned task_id = 0;
  // The page tables change on every clear TLB (the OS remapped pages), so a
  // translation that survived a clear would give a wrong PA.
  int unsigned epoch = 0;
  int unsigned map_id;
  assign map_id = task_id + 64 * epoch;

  banked_tlb dut (.*);

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
  longint cyc = 0;
  // mechanism counters
  int i_src [4] = '{0, 0, 0, 0};
  int d_src [4] = '{0, 0, 0, 0};
  int n_fault = 0, n_new = 0, n_reuse = 0, n_evict = 0, n_switch = 0, n_clear = 0;
  int n_pf_abort = 0, n_stall = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (bank_activate) begin
        if (bank_reused) n_reuse++;
        else begin
          n_new++;
          if (&dut.u_tags.valid_q) n_evict++;
        end
      end
      if ((i_lk_valid && !i_lk_ready) || (d_lk_valid && !d_lk_ready)) n_stall++;
      if ((ctx_switch || clear_tlb) && (i_prefetching || d_prefetching)) n_pf_abort++;
    end
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  // one lookup on the ITLB (side 0) or the DTLB (side 1); returns source and latency
  task automatic lookup(bit side, logic [31:0] va, output tlb_src_e src, output int lat);
    logic [16:0] vpn;
    longint t0;
    bit flt;
    logic [31:0] pa;
    vpn = va[31:15];
    @(negedge clk);
    if (side) begin d_lk_valid = 1; d_lk_va = va; end
    else      begin i_lk_valid = 1; i_lk_va = va; end
    #1;
    while (side ? !d_lk_ready : !i_lk_ready) begin @(negedge clk); #1; end
    t0 = cyc;
    if (side ? d_rsp_valid : i_rsp_valid) begin
      lat = 0;
    end else begin
      @(posedge clk); #1;
      if (side) d_lk_valid = 0; else i_lk_valid = 0;
      do begin @(negedge clk); #1; end while (side ? !d_rsp_valid : !i_rsp_valid);
      lat = int'(cyc - t0);
    end
    src = side ? d_rsp_src : i_rsp_src;
    flt = side ? d_rsp_fault : i_rsp_fault;
    pa  = side ? d_rsp_pa : i_rsp_pa;
    check(flt === pt_fault(map_id, vpn), "fault bit");
    if (!flt) check(pa === {pt_ppn(map_id, vpn), va[14:0]}, "PA");
    if (src === SRC_BANK || src === SRC_PB) check(lat === 0, "hit answers in the lookup cycle");
    if (flt) n_fault++;
    if (side) d_src[src]++; else i_src[src]++;
    if (lat == 0) begin
      @(posedge clk); #1;
      if (side) d_lk_valid = 0; else i_lk_valid = 0;
    end
  endtask

  task automatic settle();
    do @(negedge clk); while (i_prefetching || d_prefetching || !i_lk_ready || !d_lk_ready);
  endtask

  task automatic pulse_switch(bit clear);
    @(negedge clk);
    if (clear) begin clear_tlb = 1; n_clear++; epoch++; end
    else       begin ctx_switch = 1; n_switch++; end
    @(negedge clk); ctx_switch = 0; clear_tlb = 0;
  endtask

  // task layout: code pages from code_base(t), data pages from data_base(t)
  function automatic int unsigned code_base(int unsigned t); return 'h100 + t * 'h200; endfunction
  function automatic int unsigned data_base(int unsigned t); return 'h8000 + t * 'h400; endfunction
  function automatic logic [31:0] va_of(int unsigned vpn);
    return {17'(vpn), 15'($urandom)};
  endfunction

  // one time slice of task t
  int unsigned pc_page [NTASK];
  int unsigned dptr [NTASK];
  task automatic run_slice(int unsigned t, int unsigned len);
    tlb_src_e s, s2;
    int lat, lat2;
    task_id = t;
    lookup(0, va_of(code_base(t)), s, lat);      // entry page: opens or reuses the bank
    for (int unsigned k = 0; k < len; k++) begin
      int unsigned r;
      r = $urandom_range(0, 99);
      if (r < 3) pc_page[t] = $urandom_range(0, 40);
      else if (r < 25) pc_page[t] = (pc_page[t] + 1) % 41;
      r = $urandom_range(0, 99);
      if (r < 40) begin
        if ($urandom_range(0, 9) == 0) dptr[t] = $urandom_range(0, 300);
        else dptr[t] = (dptr[t] + $urandom_range(0, 2)) % 301;
        fork
          lookup(0, va_of(code_base(t) + pc_page[t]), s, lat);
          lookup(1, va_of(data_base(t) + dptr[t]), s2, lat2);
        join
      end else begin
        lookup(0, va_of(code_base(t) + pc_page[t]), s, lat);
      end
    end
  endtask

  initial begin
    tlb_src_e s;
    int lat;
    for (int t = 0; t < NTASK; t++) begin pc_page[t] = 0; dptr[t] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;

    // directed: a data access before any bank is current is not stored
    task_id = 0;
    lookup(1, va_of(data_base(0) + 3), s, lat);
    check(s === SRC_BYPASS && !cur_valid, "DTLB bypass while no bank is current");
    settle();
    // directed: first fetch walks and opens a bank LAT+3 cycles after
    // the lookup cycle (request, LAT cycles of memory, activation)
    lookup(0, va_of(code_base(0)), s, lat);
    check(s === SRC_WALK && lat === LAT + 3 && cur_valid, "first fetch opens a bank");
    check(dut.u_tags.tag_q[cur_idx] === pt_ppn(0, 17'(code_base(0))), "task tag = entry PPN");
    settle();
    lookup(1, va_of(data_base(0) + 4), s, lat);
    check(s === SRC_PB, "neighbour of the bypassed data page was prefetched");
    settle();
    lookup(1, va_of(data_base(0) + 3), s, lat);
    check(s !== SRC_BANK, "bypassed data page was not stored");
    lookup(0, va_of(code_base(0) + 1), s, lat);
    check(s === SRC_PB, "next code page from the prefetch buffer");
    settle();
    // directed: switch to task 1, then back to task 0: bank 0's entries survive
    pulse_switch(0);
    check(!cur_valid, "no current bank after a switch");
    run_slice(1, 20);
    settle(); pulse_switch(0);
    task_id = 0;
    begin
      int reuse0;
      reuse0 = n_reuse;
      lookup(0, va_of(code_base(0)), s, lat);
      check(s === SRC_WALK && n_reuse === reuse0 + 1 && cur_valid, "return to task 0 reopens its bank");
    end
    lookup(0, va_of(code_base(0) + 1), s, lat);
    check(s === SRC_BANK, "task 0 page kept across the switch");
    lookup(1, va_of(data_base(0) + 3), s, lat);
    check(s === SRC_BANK, "task 0 data page kept across the switch");
    settle();
    // directed: clear TLB, then task 0 gets a fresh bank
    pulse_switch(1);
    begin
      int reuse0;
      reuse0 = n_reuse;
      lookup(0, va_of(code_base(0)), s, lat);
      check(n_reuse === reuse0, "no reuse after clear TLB");
      check(s === SRC_WALK, "first fetch after clear TLB walks");
      lookup(0, va_of(code_base(0) + 1), s, lat);
      check(s !== SRC_BANK, "entries gone after clear TLB");
    end
    settle(); pulse_switch(0);

    // workload
    for (int unsigned sl = 0; sl < SLICES; sl++) begin
      int unsigned t;
      t = ($urandom_range(0, 3) != 0) ? $urandom_range(0, 7) : $urandom_range(8, NTASK - 1);
      run_slice(t, SLICE_LEN);
      if ($urandom_range(0, 1) == 0) repeat ($urandom_range(0, 6)) @(negedge clk);
      else settle();
      pulse_switch($urandom_range(0, 49) == 0);
    end
    settle();

    $display("ITLB answers: bank=%0d pb=%0d walk=%0d bypass=%0d", i_src[0], i_src[1], i_src[2], i_src[3]);
    $display("DTLB answers: bank=%0d pb=%0d walk=%0d bypass=%0d", d_src[0], d_src[1], d_src[2], d_src[3]);
    $display("faults=%0d banks new=%0d reused=%0d evicted=%0d switches=%0d clears=%0d",
             n_fault, n_new, n_reuse, n_evict, n_switch, n_clear);
    $display("prefetch rounds cut short=%0d stalled lookup cycles=%0d", n_pf_abort, n_stall);
    $display("miss ratio (walked answers / all answers): ITLB %0.4f  DTLB %0.4f",
             real'(i_src[SRC_WALK] + i_src[SRC_BYPASS]) / real'(i_src[0] + i_src[1] + i_src[2] + i_src[3]),
             real'(d_src[SRC_WALK] + d_src[SRC_BYPASS]) / real'(d_src[0] + d_src[1] + d_src[2] + d_src[3]));
    check(i_src[SRC_BANK] > 0 && d_src[SRC_BANK] > 0, "bank hits on both sides");
    check(i_src[SRC_PB] > 0 && d_src[SRC_PB] > 0, "prefetch-buffer hits on both sides");
    check(i_src[SRC_WALK] > 0 && d_src[SRC_WALK] > 0, "walks on both sides");
    check(d_src[SRC_BYPASS] > 0, "DTLB bypass");
    check(n_fault > 0, "faults");
    check(n_new > 0 && n_reuse > 0 && n_evict > 0, "new, reused and evicted banks");
    check(n_switch > 0 && n_clear > 0, "context switches and clear TLB");
    check(n_pf_abort > 0, "prefetch round cut short");
    check(n_stall > 0, "lookups stalled by a prefetch round");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
