// banked_tlb: banked TLB with sequential prefetching for 32 KB pages.
//
// The TLB keeps the translations of up to NUM_BANKS tasks side by side
// instead of flushing them on every context switch. Each task owns one bank
// of BANK_ENTRIES fully associative entries (32 x 32 = 1024 entries per side
// by default); a bank tag per bank records which task owns it. The ITLB and
// the DTLB are a couple: both have the same banks and share one set of bank
// tags, so bank b of the ITLB and bank b of the DTLB belong to the same task.
// Each side has its own 17-entry prefetch buffer and its own prefetch &
// control logic, which on a miss fetches the missing page and then the pages
// VPN-8 .. VPN-1 and VPN+1 .. VPN+9 into the prefetch buffer.
// Operating-system events (one-cycle pulses, given while neither side is
// waiting for a page walk):
//  * ctx_switch: no bank is current any more, the prefetch buffers empty.
//    The first instruction fetch of the next task misses, is walked, and its
//    PPN (or the asid input, with USE_ASID = 1) selects the task's bank:
//    an existing bank with that tag is reused with all its entries, otherwise
//    the LRU or an invalid bank is flushed and given to the task.
//  * clear_tlb: sent by the OS on page swapping or page-frame release; all
//    banks and bank tags (only the current one with CLEAR_ALL = 0) and both
//    prefetch buffers are invalidated.
// Each side has a lookup port (valid/ready, VA in; PA, fault and source
// out; hits answer in the same cycle) and a memory-system port on which it
// issues page-table walks and prefetches (valid/ready request with the VPN,
// response with the PPN or a fault, one outstanding). Only the ITLB opens a
// bank; a DTLB miss while no bank is current is walked and returned but not
// stored (a design choice: the first access of a task is its instruction
// fetch). The PA width (32 bits) is likewise this design's choice.
module banked_tlb
  import tlb_pkg::*;
#(
  parameter int unsigned VA_WIDTH     = VA_WIDTH_DEF,
  parameter int unsigned PA_WIDTH     = PA_WIDTH_DEF,
  parameter int unsigned PAGE_BITS    = PAGE_BITS_DEF,
  parameter int unsigned NUM_BANKS    = NUM_BANKS_DEF,
  parameter int unsigned BANK_ENTRIES = BANK_ENTRIES_DEF,
  parameter int unsigned SP_BEHIND    = SP_BEHIND_DEF,
  parameter int unsigned SP_AHEAD     = SP_AHEAD_DEF,
  parameter int unsigned TAG_WIDTH    = TASK_TAG_WIDTH_DEF,
  parameter bit          USE_ASID     = 1'b0,
  parameter bit          CLEAR_ALL    = 1'b1,
  localparam int unsigned VPN_WIDTH   = VA_WIDTH - PAGE_BITS,
  localparam int unsigned PPN_WIDTH   = PA_WIDTH - PAGE_BITS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // operating-system events
  input  logic                 ctx_switch,
  input  logic                 clear_tlb,
  input  logic [TAG_WIDTH-1:0] asid,
  // ITLB lookup
  input  logic                 i_lk_valid,
  output logic                 i_lk_ready,
  input  logic [VA_WIDTH-1:0]  i_lk_va,
  output logic                 i_rsp_valid,
  output logic [PA_WIDTH-1:0]  i_rsp_pa,
  output logic                 i_rsp_fault,
  output tlb_src_e             i_rsp_src,
  // ITLB memory-system port
  output logic                 i_mem_req_valid,
  input  logic                 i_mem_req_ready,
  output logic [VPN_WIDTH-1:0] i_mem_req_vpn,
  output logic                 i_mem_req_prefetch,
  input  logic                 i_mem_rsp_valid,
  input  logic [PPN_WIDTH-1:0] i_mem_rsp_ppn,
  input  logic                 i_mem_rsp_fault,
  // DTLB lookup
  input  logic                 d_lk_valid,
  output logic                 d_lk_ready,
  input  logic [VA_WIDTH-1:0]  d_lk_va,
  output logic                 d_rsp_valid,
  output logic [PA_WIDTH-1:0]  d_rsp_pa,
  output logic                 d_rsp_fault,
  output tlb_src_e             d_rsp_src,
  // DTLB memory-system port
  output logic                 d_mem_req_valid,
  input  logic                 d_mem_req_ready,
  output logic [VPN_WIDTH-1:0] d_mem_req_vpn,
  output logic                 d_mem_req_prefetch,
  input  logic                 d_mem_rsp_valid,
  input  logic [PPN_WIDTH-1:0] d_mem_rsp_ppn,
  input  logic                 d_mem_rsp_fault,
  // status
  output logic                 cur_valid,
  output logic [$clog2(NUM_BANKS)-1:0] cur_idx,
  output logic                 bank_activate,   // a bank was made current this cycle
  output logic                 bank_reused,     // ... and it already belonged to the task
  output logic                 i_prefetching,
  output logic                 d_prefetching
);
  logic [NUM_BANKS-1:0] cur_onehot, flush_vec;
  logic                 i_act_valid, d_act_valid;
  logic [TAG_WIDTH-1:0] i_act_tag, d_act_tag;
  logic                 pf_flush;

  assign pf_flush = ctx_switch || clear_tlb;

  bank_tag_unit #(
    .NUM_BANKS (NUM_BANKS),
    .TAG_WIDTH (TAG_WIDTH),
    .CLEAR_ALL (CLEAR_ALL)
  ) u_tags (
    .clk        (clk),
    .rst_n      (rst_n),
    .ctx_switch (ctx_switch),
    .clear_tlb  (clear_tlb),
    .act_valid  (i_act_valid || d_act_valid),
    .act_tag    (i_act_valid ? i_act_tag : d_act_tag),
    .act_reused (bank_reused),
    .flush_vec  (flush_vec),
    .cur_valid  (cur_valid),
    .cur_onehot (cur_onehot),
    .cur_idx    (cur_idx)
  );

  assign bank_activate = (i_act_valid || d_act_valid) && !pf_flush;

  tlb_side #(
    .VA_WIDTH (VA_WIDTH), .PA_WIDTH (PA_WIDTH), .PAGE_BITS (PAGE_BITS),
    .NUM_BANKS (NUM_BANKS), .BANK_ENTRIES (BANK_ENTRIES),
    .SP_BEHIND (SP_BEHIND), .SP_AHEAD (SP_AHEAD), .TAG_WIDTH (TAG_WIDTH),
    .ACTIVATE (1'b1), .USE_ASID (USE_ASID)
  ) u_itlb (
    .clk (clk), .rst_n (rst_n),
    .lk_valid (i_lk_valid), .lk_ready (i_lk_ready), .lk_va (i_lk_va),
    .rsp_valid (i_rsp_valid), .rsp_pa (i_rsp_pa), .rsp_fault (i_rsp_fault), .rsp_src (i_rsp_src),
    .cur_onehot (cur_onehot), .flush_vec (flush_vec),
    .act_valid (i_act_valid), .act_tag (i_act_tag), .asid (asid), .pf_flush (pf_flush),
    .mem_req_valid (i_mem_req_valid), .mem_req_ready (i_mem_req_ready),
    .mem_req_vpn (i_mem_req_vpn), .mem_req_prefetch (i_mem_req_prefetch),
    .mem_rsp_valid (i_mem_rsp_valid), .mem_rsp_ppn (i_mem_rsp_ppn), .mem_rsp_fault (i_mem_rsp_fault),
    .prefetching (i_prefetching)
  );

  tlb_side #(
    .VA_WIDTH (VA_WIDTH), .PA_WIDTH (PA_WIDTH), .PAGE_BITS (PAGE_BITS),
    .NUM_BANKS (NUM_BANKS), .BANK_ENTRIES (BANK_ENTRIES),
    .SP_BEHIND (SP_BEHIND), .SP_AHEAD (SP_AHEAD), .TAG_WIDTH (TAG_WIDTH),
    .ACTIVATE (1'b0), .USE_ASID (USE_ASID)
  ) u_dtlb (
    .clk (clk), .rst_n (rst_n),
    .lk_valid (d_lk_valid), .lk_ready (d_lk_ready), .lk_va (d_lk_va),
    .rsp_valid (d_rsp_valid), .rsp_pa (d_rsp_pa), .rsp_fault (d_rsp_fault), .rsp_src (d_rsp_src),
    .cur_onehot (cur_onehot), .flush_vec (flush_vec),
    .act_valid (d_act_valid), .act_tag (d_act_tag), .asid (asid), .pf_flush (pf_flush),
    .mem_req_valid (d_mem_req_valid), .mem_req_ready (d_mem_req_ready),
    .mem_req_vpn (d_mem_req_vpn), .mem_req_prefetch (d_mem_req_prefetch),
    .mem_rsp_valid (d_mem_rsp_valid), .mem_rsp_ppn (d_mem_rsp_ppn), .mem_rsp_fault (d_mem_rsp_fault),
    .prefetching (d_prefetching)
  );

endmodule
