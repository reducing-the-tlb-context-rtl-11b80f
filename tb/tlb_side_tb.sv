// tlb_side_tb: self-checking test of one TLB side (banks, prefetch buffer,
// multiplexer and control) at a reduced size: 4 banks of 8 entries.
//
// The testbench plays the shared bank-tag unit: when the side asks for an
// activation it makes a bank of its choice current, flushing it or not.
// The memory system is the behavioural model; the task it translates for is
// switched together with the bank. Every answer's PA is compared with the
// page table of the running task (PPN and the untouched page offset), and
// the source of each answer is checked in directed steps: a walk, a bank
// hit, a prefetch-buffer hit for a neighbouring page, a bank that keeps its
// entries across a context switch, a second task in another bank, LRU
// eviction inside a bank, and a random mix of both tasks with switches.
module tlb_side_tb;
  import tlb_pkg::*;
  import tb_mem_pkg::*;
  localparam int unsigned NB = 4, NE = 8, LAT = 3;

  logic clk = 0, rst_n = 0;
  logic lk_valid = 0, lk_ready;
  logic [31:0] lk_va = '0;
  logic rsp_valid, rsp_fault;
  logic [31:0] rsp_pa;
  tlb_src_e rsp_src;
  logic [NB-1:0] cur_onehot = '0, flush_vec;
  logic act_valid;
  logic [16:0] act_tag, asid = '0;
  logic pf_flush = 0;
  logic mem_req_valid, mem_req_ready, mem_req_prefetch, mem_rsp_valid, mem_rsp_fault;
  logic [16:0] mem_req_vpn, mem_rsp_ppn;
  logic prefetching;
  int unsigned task_id = 1;

  int checks = 0, failures = 0;
  int n_src [4] = '{0, 0, 0, 0};

  int  next_bank = 0;
  bit  flush_on_act = 1;
  logic [16:0] last_act_tag = '0;

  tlb_side #(.NUM_BANKS(NB), .BANK_ENTRIES(NE), .ACTIVATE(1'b1)) dut (.*);

  mem_system_model #(.LATENCY(LAT)) u_mem (
    .clk, .rst_n, .task_id,
    .req_valid (mem_req_valid), .req_ready (mem_req_ready), .req_vpn (mem_req_vpn),
    .req_prefetch (mem_req_prefetch), .rsp_valid (mem_rsp_valid), .rsp_ppn (mem_rsp_ppn),
    .rsp_fault (mem_rsp_fault)
  );

  always #5 clk = ~clk;

  // the bank-tag unit, played by the testbench
  assign flush_vec = (act_valid && flush_on_act) ? NB'(1 << next_bank) : '0;
  always @(posedge clk) if (act_valid) begin
    cur_onehot   <= NB'(1 << next_bank);
    last_act_tag <= act_tag;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic lookup(logic [31:0] va, output tlb_src_e src);
    logic [16:0] vpn;
    vpn = va[31:15];
    @(negedge clk);
    lk_valid = 1; lk_va = va; #1;
    while (!lk_ready) begin @(negedge clk); #1; end
    if (rsp_valid) begin
      src = rsp_src;
      check(rsp_pa === {pt_ppn(task_id, vpn), va[14:0]} && !rsp_fault, "hit PA");
      @(posedge clk); #1 lk_valid = 0;
    end else begin
      @(posedge clk); #1 lk_valid = 0;
      do begin @(negedge clk); #1; end while (!rsp_valid);
      src = rsp_src;
      check(rsp_fault === pt_fault(task_id, vpn), "walk fault bit");
      if (!rsp_fault) check(rsp_pa === {pt_ppn(task_id, vpn), va[14:0]}, "walk PA");
    end
    n_src[src]++;
  endtask

  task automatic settle();
    do @(negedge clk); while (prefetching || !lk_ready);
  endtask

  task automatic ctx_switch(int unsigned new_task);
    @(negedge clk); pf_flush = 1; cur_onehot = '0;
    @(negedge clk); pf_flush = 0; task_id = new_task;
  endtask

  function automatic logic [31:0] va_of(int unsigned vpn);
    return {17'(vpn), 15'($urandom)};
  endfunction

  initial begin
    tlb_src_e s;
    repeat (3) @(posedge clk); rst_n = 1;

    // task 1 in bank 2
    next_bank = 2; flush_on_act = 1;
    lookup(va_of('h205), s); check(s === SRC_WALK, "first access walks");
    check(cur_onehot === 4'b0100, "bank 2 activated");
    check(last_act_tag === pt_ppn(1, 'h205), "task tag is the walked PPN");
    lookup(va_of('h205), s); check(s === SRC_BANK, "second access hits the bank");
    settle();
    lookup(va_of('h206), s); check(s === SRC_PB, "neighbour page from prefetch buffer");
    lookup(va_of('h206), s); check(s === SRC_BANK, "prefetched page now in the bank");
    settle();
    lookup(va_of('h1FE), s); check(s === SRC_PB, "page behind from prefetch buffer");
    settle();

    // context switch to task 2 in bank 1
    ctx_switch(2);
    next_bank = 1;
    lookup(va_of('h207), s); check(s === SRC_WALK, "task 2 walks");
    check(cur_onehot === 4'b0010, "bank 1 activated");
    lookup(va_of('h207), s); check(s === SRC_BANK, "task 2 hits its bank");
    settle();

    // back to task 1: bank 2 is reused without a flush and keeps its entries
    ctx_switch(1);
    next_bank = 2; flush_on_act = 0;
    lookup(va_of('h205), s); check(s === SRC_WALK, "first access after switch walks");
    lookup(va_of('h206), s); check(s === SRC_BANK, "task 1 entries kept across switches");
    lookup(va_of('h1FE), s); check(s === SRC_BANK, "task 1 entries kept across switches (2)");
    settle();

    // LRU inside a bank: 8 entries; touch far-apart pages so the PB cannot help
    for (int i = 1; i <= NE; i++) begin lookup(va_of('h205 + 40 * i), s); settle(); end
    lookup(va_of('h205), s); check(s === SRC_WALK, "oldest entry evicted");
    settle();
    lookup(va_of('h205 + 40 * NE), s); check(s === SRC_BANK, "recent entry still present");

    // random mix of two tasks in two banks
    for (int k = 0; k < 1500; k++) begin
      if ($urandom_range(0, 60) == 0) begin
        int unsigned t;
        settle();
        t = (task_id == 1) ? 2 : 1;
        ctx_switch(t);
        next_bank = (t == 1) ? 2 : 1;
      end
      lookup(va_of('h300 + $urandom_range(0, 60)), s);
    end
    check(n_src[SRC_BANK] > 0 && n_src[SRC_PB] > 0 && n_src[SRC_WALK] > 0, "all sources seen");
    $display("answers: bank=%0d pb=%0d walk=%0d", n_src[SRC_BANK], n_src[SRC_PB], n_src[SRC_WALK]);
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
