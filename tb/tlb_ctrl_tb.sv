// tlb_ctrl_tb: self-checking test of the prefetch & control logic alone.
//
// The testbench plays the datapath around the controller: it decides whether
// the current bank or the prefetch buffer hits and whether a bank is current,
// and it answers activations the way the bank-tag unit does (a bank becomes
// current on the next edge). The memory system is the behavioural model with
// a 4-cycle latency. A monitor records every memory request, prefetch-buffer
// write, bank write and activation. Checked: the demand walk and its answer
// (PPN, source, cycle count), the activation tag (the walked PPN), the bank
// write, the 17 prefetch requests in the order VPN-8..VPN-1, VPN+1..VPN+9 and
// the slot each lands in, faults (no insert, no prefetch), prefetch-buffer
// hits (same-cycle answer, copy into the bank, new round), bank hits served
// and misses stalled during a round, pages below address 0 left empty, and
// a round cut short by a context switch.
module tlb_ctrl_tb;
  import tlb_pkg::*;
  import tb_mem_pkg::*;
  localparam int unsigned VW = 17, PW = 17, TW = 17, NPF = 17, LAT = 4;

  logic clk = 0, rst_n = 0;
  logic lk_valid = 0, lk_ready;
  logic [VW-1:0] lk_vpn = '0, dp_vpn;
  logic rsp_valid, rsp_fault;
  logic [PW-1:0] rsp_ppn;
  tlb_src_e rsp_src;
  logic bank_hit = 0, pb_hit = 0, cur_valid = 0;
  logic [PW-1:0] hit_ppn = '0;
  logic bank_touch, bank_wr_en, pb_wr_en, pb_wr_valid, pf_abort = 0, act_valid;
  logic [VW-1:0] bank_wr_vpn, pb_wr_vpn, mem_req_vpn;
  logic [PW-1:0] bank_wr_ppn, pb_wr_ppn, mem_rsp_ppn;
  logic [4:0] pb_wr_slot;
  logic [TW-1:0] act_tag, asid = '0;
  logic mem_req_valid, mem_req_ready, mem_req_prefetch, mem_rsp_valid, mem_rsp_fault;
  logic prefetching;
  int unsigned task_id = 3;

  int checks = 0, failures = 0;

  tlb_ctrl #(.VPN_WIDTH(VW), .PPN_WIDTH(PW), .TAG_WIDTH(TW), .ACTIVATE(1'b1)) dut (.*);

  mem_system_model #(.LATENCY(LAT)) u_mem (
    .clk, .rst_n, .task_id,
    .req_valid (mem_req_valid), .req_ready (mem_req_ready), .req_vpn (mem_req_vpn),
    .req_prefetch (mem_req_prefetch), .rsp_valid (mem_rsp_valid), .rsp_ppn (mem_rsp_ppn),
    .rsp_fault (mem_rsp_fault)
  );

  always #5 clk = ~clk;

  // monitor
  typedef struct { logic [VW-1:0] vpn; bit pf; } req_t;
  typedef struct { int slot; bit v; logic [VW-1:0] vpn; logic [PW-1:0] ppn; } pbw_t;
  req_t reqs[$];
  pbw_t pbws[$];
  logic [VW-1:0] bw_vpn[$];
  logic [PW-1:0] bw_ppn[$];
  logic [TW-1:0] acts[$];
  int n_touch = 0, n_stall = 0;
  longint cyc = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (mem_req_valid && mem_req_ready) reqs.push_back('{mem_req_vpn, mem_req_prefetch});
      if (pb_wr_en) pbws.push_back('{int'(pb_wr_slot), pb_wr_valid, pb_wr_vpn, pb_wr_ppn});
      if (bank_wr_en) begin bw_vpn.push_back(bank_wr_vpn); bw_ppn.push_back(bank_wr_ppn); end
      if (act_valid) begin acts.push_back(act_tag); cur_valid <= 1; end
      if (bank_touch) n_touch++;
      if (lk_valid && !lk_ready) n_stall++;
    end
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  function automatic logic [VW-1:0] pf_vpn(logic [VW-1:0] c, int k);
    return (k < 8) ? VW'(int'(c) - 8 + k) : VW'(int'(c) + k - 7);
  endfunction

  // Issue a lookup that misses; wait for the answer; return the cycles taken.
  task automatic miss_lookup(logic [VW-1:0] v, output int lat);
    longint t0;
    @(negedge clk);
    lk_valid = 1; lk_vpn = v; bank_hit = 0; pb_hit = 0;
    check(lk_ready, "ready in idle");
    @(posedge clk); t0 = cyc;
    #1 lk_valid = 0;
    while (!rsp_valid) @(negedge clk);
    lat = int'(cyc - t0);  // cycles from the lookup cycle to the answer cycle
    check(rsp_ppn === pt_ppn(task_id, v) && rsp_fault === pt_fault(task_id, v),
          "walk answer");
  endtask

  task automatic wait_idle();
    do @(negedge clk); while (prefetching || dut.state_q != 0);
  endtask

  task automatic check_round(logic [VW-1:0] c, int first);
    for (int k = 0; k < NPF; k++) begin
      logic [VW-1:0] v;
      v = pf_vpn(c, k);
      check(pbws.size() > first + k, "prefetch write present");
      if (pbws.size() > first + k) begin
        pbw_t w;
        w = pbws[first + k];
        check(w.slot === k, "prefetch slot order");
        check(w.vpn === v, "prefetch page");
        check(w.v === !pt_fault(task_id, v), "prefetch valid follows fault");
        if (w.v) check(w.ppn === pt_ppn(task_id, v), "prefetch ppn");
      end
    end
  endtask

  initial begin
    int lat;
    repeat (3) @(posedge clk); rst_n = 1;

    // 1. no bank current: walk, activation with the walked PPN, insert, 17 prefetches
    miss_lookup(17'h105, lat);
    check(rsp_src === SRC_WALK, "walk source after activation");
    check(lat === LAT + 3, "walk latency with activation");
    check(acts.size() === 1 && acts[0] === pt_ppn(task_id, 17'h105), "activation tag is walked PPN");
    wait_idle();
    check(reqs.size() === 1 + NPF, "one demand and 17 prefetch requests");
    check(!reqs[0].pf && reqs[0].vpn === 17'h105, "demand request first");
    for (int k = 0; k < NPF; k++)
      check(reqs[1 + k].pf && reqs[1 + k].vpn === pf_vpn(17'h105, k), "prefetch request order");
    check(bw_vpn.size() === 1 && bw_vpn[0] === 17'h105 && bw_ppn[0] === pt_ppn(task_id, 17'h105),
          "walked page inserted");
    check_round(17'h105, 0);

    // 2. prefetch-buffer hit: same-cycle answer, insert, new round
    reqs.delete(); pbws.delete(); bw_vpn.delete(); bw_ppn.delete();
    @(negedge clk);
    lk_valid = 1; lk_vpn = 17'h108; pb_hit = 1; hit_ppn = pt_ppn(task_id, 17'h108); #1;
    check(lk_ready && rsp_valid && rsp_src === SRC_PB && rsp_ppn === hit_ppn, "PB hit answer");
    check(bank_wr_en && bank_wr_vpn === 17'h108 && bank_wr_ppn === hit_ppn, "PB hit copied to bank");
    @(negedge clk); lk_valid = 0; pb_hit = 0;
    // 3. during the round: a bank hit is served, a miss stalls
    @(negedge clk);
    lk_valid = 1; lk_vpn = 17'h105; bank_hit = 1; hit_ppn = 17'h1234; #1;
    check(prefetching && lk_ready && rsp_valid && rsp_src === SRC_BANK && bank_touch,
          "bank hit served during prefetch");
    @(negedge clk); bank_hit = 0; lk_vpn = 17'h2000; #1;
    check(!lk_ready && !rsp_valid, "miss stalls during prefetch");
    @(negedge clk); lk_valid = 0;
    wait_idle();
    check(reqs.size() === NPF, "second round: 17 requests, no demand");
    check_round(17'h108, 0);

    // 4. a fault: answered as such, nothing inserted, no prefetch
    begin
      logic [VW-1:0] fv;
      fv = 17'h40;
      while (!pt_fault(task_id, fv)) fv++;
      reqs.delete(); bw_vpn.delete();
      miss_lookup(fv, lat);
      check(rsp_fault && rsp_src === SRC_WALK, "fault reported");
      check(lat === LAT + 2, "walk latency with a current bank");
      repeat (30) @(negedge clk);
      check(reqs.size() === 1 && bw_vpn.size() === 0, "no insert, no prefetch after fault");
    end

    // 5. near page 0: slots for pages below 0 are emptied without a request
    reqs.delete(); pbws.delete();
    miss_lookup(17'h3, lat);
    wait_idle();
    check(reqs.size() === 1 + NPF - 5, "pages below 0 not requested");
    for (int k = 0; k < 5; k++) check(pbws[k].slot === k && !pbws[k].v, "slot below 0 emptied");

    // 6. context switch in the middle of a round stops it
    reqs.delete(); pbws.delete();
    miss_lookup(17'h505, lat);
    repeat (3 * LAT) @(negedge clk);
    pf_abort = 1;
    @(negedge clk); pf_abort = 0;
    wait_idle();
    check(pbws.size() < NPF && reqs.size() < 1 + NPF, "round cut short");
    begin
      int n;
      n = reqs.size();
      repeat (40) @(negedge clk);
      check(reqs.size() === n, "no request after the round stopped");
    end

    // 7. activation of a bank that already holds the page: touch only
    cur_valid = 0; bw_vpn.delete(); acts.delete();
    @(negedge clk); lk_valid = 1; lk_vpn = 17'h705; @(negedge clk); lk_valid = 0;
    while (!act_valid) @(negedge clk);
    @(negedge clk); bank_hit = 1; #1;   // ACT cycle: the reused bank holds the page
    check(rsp_valid && rsp_src === SRC_WALK && bank_touch && !bank_wr_en, "reused bank: touch, no write");
    @(negedge clk); bank_hit = 0;
    wait_idle();

    check(n_stall > 0 && n_touch > 0, "stall and touch seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
